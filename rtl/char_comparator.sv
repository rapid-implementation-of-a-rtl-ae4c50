// Character comparator of one processing element.
//
// Holds the source character travelling right and the target character
// travelling left through this PE. Both are captured on the PE's character
// edge (rising edge of clk for PHASE 0, falling edge for PHASE 1; adjacent
// PEs use opposite phases) and passed on unchanged to the neighbours. From
// the held characters it derives three flags for the distance FSM:
//   src_null / tgt_null : the character is the all-zero filler code
//   match               : the two characters match
// DNA mode (4-bit codes A=0001 C=0010 G=0100 T=1000, wildcards R=0101,
// Y=1010, N=1111) matches when the codes share a set bit, so wildcards match
// every base they stand for; this rule and the codes follow the source
// design. The null code 0000 and, for ASCII mode (7-bit), the
// match-on-equality rule are choices of this implementation.
// The flags are combinational from the held characters and are used by the
// FSM on the opposite clock edge, half a clock later.
module char_comparator
  import nac_pkg::*;
#(
  parameter char_mode_e MODE   = MODE_DNA,
  parameter int         CHAR_W = char_width(MODE),
  parameter bit         PHASE  = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CHAR_W-1:0] src_chr_i,   // from left neighbour
  input  logic [CHAR_W-1:0] tgt_chr_i,   // from right neighbour
  output logic [CHAR_W-1:0] src_chr_o,   // to right neighbour
  output logic [CHAR_W-1:0] tgt_chr_o,   // to left neighbour
  output logic              src_null,
  output logic              tgt_null,
  output logic              match
);

  logic [CHAR_W-1:0] src_q, tgt_q;

  if (PHASE == 1'b0) begin : g_rise
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        src_q <= '0;
        tgt_q <= '0;
      end else begin
        src_q <= src_chr_i;
        tgt_q <= tgt_chr_i;
      end
    end
  end else begin : g_fall
    always_ff @(negedge clk or negedge rst_n) begin
      if (!rst_n) begin
        src_q <= '0;
        tgt_q <= '0;
      end else begin
        src_q <= src_chr_i;
        tgt_q <= tgt_chr_i;
      end
    end
  end

  assign src_chr_o = src_q;
  assign tgt_chr_o = tgt_q;

  always_comb begin
    src_null = (src_q == '0);
    tgt_null = (tgt_q == '0);
    if (MODE == MODE_DNA) match = |(src_q & tgt_q);
    else                  match = (src_q == tgt_q) && !src_null;
  end

endmodule
