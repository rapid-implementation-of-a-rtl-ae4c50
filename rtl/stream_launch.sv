// Launches a character stream into one end of the PE array.
//
// Input: one (character, travelling distance) pair per clock, changing on
// the rising edge. Output: the same pair timed as if it came from a PE of
// phase PHASE, so that the first PE of the array (of the opposite phase)
// captures the character on its character edge and finds the matching
// distance on its FSM edge half a clock later.
//   PHASE 1: character re-timed to the falling edge, distance to the
//            following rising edge.
//   PHASE 0: both captured on the rising edge, distance re-timed to the
//            falling edge.
// Adds half to one clock of latency. This re-timing stage is a detail of
// this implementation; it is the two-phase discipline of the PEs applied at
// the array boundary.
module stream_launch
  import nac_pkg::*;
#(
  parameter int CHAR_W = 4,
  parameter bit PHASE  = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CHAR_W-1:0] chr_i,
  input  dist_t             dst_i,
  output logic [CHAR_W-1:0] chr_o,
  output dist_t             dst_o
);

  if (PHASE == 1'b1) begin : g_odd
    always_ff @(negedge clk or negedge rst_n) begin
      if (!rst_n) chr_o <= '0;
      else        chr_o <= chr_i;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) dst_o <= '0;
      else        dst_o <= dst_i;
    end
  end else begin : g_even
    dist_t dst_h;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        chr_o <= '0;
        dst_h <= '0;
      end else begin
        chr_o <= chr_i;
        dst_h <= dst_i;
      end
    end
    always_ff @(negedge clk or negedge rst_n) begin
      if (!rst_n) dst_o <= '0;
      else        dst_o <= dst_h;
    end
  end

endmodule
