// Collects the character stream leaving one end of the PE array.
//
// Acts as the next PE (of phase PHASE) after the last one: it captures the
// character on its character edge and the distance on its FSM edge, then
// presents both as one (character, distance) pair that is stable across a
// rising clock edge, one new pair per clock. Latency one clock (PHASE 0) or
// two clocks (PHASE 1). A boundary detail of this implementation.
module stream_sink
  import nac_pkg::*;
#(
  parameter int CHAR_W = 4,
  parameter bit PHASE  = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CHAR_W-1:0] chr_i,
  input  dist_t             dst_i,
  output logic [CHAR_W-1:0] chr_o,
  output dist_t             dst_o
);

  if (PHASE == 1'b0) begin : g_even
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) chr_o <= '0;
      else        chr_o <= chr_i;
    end
    always_ff @(negedge clk or negedge rst_n) begin
      if (!rst_n) dst_o <= '0;
      else        dst_o <= dst_i;
    end
  end else begin : g_odd
    logic [CHAR_W-1:0] chr_h;
    always_ff @(negedge clk or negedge rst_n) begin
      if (!rst_n) chr_h <= '0;
      else        chr_h <= chr_i;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        chr_o <= '0;
        dst_o <= '0;
      end else begin
        chr_o <= chr_h;
        dst_o <= dst_i;
      end
    end
  end

endmodule
