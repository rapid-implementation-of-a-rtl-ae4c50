// Processing element of the linear systolic array.
//
// A character comparator and a distance FSM. Source characters move right,
// target characters move left, one PE per half clock. A PE with PHASE 0
// captures characters on the rising edge and updates its distance on the
// falling edge; a PE with PHASE 1 does the opposite, so a chain of PEs with
// alternating phases moves each character one PE per half clock, every PE
// computes one table entry per clock, and a PE always reads neighbour
// distances that were updated half a clock earlier. This two-phase scheme
// follows the source design.
//
// When source s_i and target t_j meet here, src_dst_i holds d(i,j-1) (from
// the left neighbour), tgt_dst_i holds d(i-1,j) (from the right neighbour)
// and the stored value is d(i-1,j-1); the FSM replaces it by d(i,j), mod 4.
module nac_pe
  import nac_pkg::*;
#(
  parameter char_mode_e MODE   = MODE_DNA,
  parameter int         CHAR_W = char_width(MODE),
  parameter bit         PHASE  = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CHAR_W-1:0] src_chr_i,
  input  dist_t             src_dst_i,
  input  logic [CHAR_W-1:0] tgt_chr_i,
  input  dist_t             tgt_dst_i,
  output logic [CHAR_W-1:0] src_chr_o,
  output dist_t             src_dst_o,
  output logic [CHAR_W-1:0] tgt_chr_o,
  output dist_t             tgt_dst_o
);

  logic src_null, tgt_null, match;

  char_comparator #(.MODE(MODE), .CHAR_W(CHAR_W), .PHASE(PHASE)) u_cmp (
    .clk, .rst_n,
    .src_chr_i, .tgt_chr_i, .src_chr_o, .tgt_chr_o,
    .src_null, .tgt_null, .match
  );

  dist_fsm #(.PHASE(PHASE)) u_fsm (
    .clk, .rst_n,
    .src_dst_i, .tgt_dst_i,
    .src_null, .tgt_null, .match,
    .src_dst_o, .tgt_dst_o
  );

endmodule
