// Distance finite state machine of one processing element.
//
// Stores the PE's distance modulo 4 and updates it once per clock on the
// PE's FSM edge (falling edge for PHASE 0, rising edge for PHASE 1), half a
// clock after the comparator captured a new character pair. The stored value
// is also the travelling distance handed to both neighbours (src_dst_o to
// the right, tgt_dst_o to the left).
//
// With insertion/deletion cost 1 and substitution cost 0/2, neighbouring
// entries of the distance table differ by exactly 1, so both travelling
// distances are the stored value d plus or minus 1, and the new entry is
// either d or d+2:
//   both real : d' = d   if match, or if either travelling distance is d-1
//               d' = d+2 otherwise                       (all mod 4)
//   src null  : d' = target's travelling distance (passes it on)
//   tgt null  : d' = source's travelling distance (passes it on)
//   both null : d' = source's travelling distance
// The null rules follow the source design's FSM equations; the d/d+2 form of
// the update is this implementation's own reduction of the recurrence.
module dist_fsm
  import nac_pkg::*;
#(
  parameter bit PHASE = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  dist_t src_dst_i,   // travelling distance of the source character
  input  dist_t tgt_dst_i,   // travelling distance of the target character
  input  logic  src_null,
  input  logic  tgt_null,
  input  logic  match,
  output dist_t src_dst_o,
  output dist_t tgt_dst_o
);

  dist_t dst_q, dst_d, dst_dec;

  always_comb begin
    dst_dec = dst_q - 2'd1;
    unique case ({src_null, tgt_null})
      2'b00: begin
        if (match || (src_dst_i == dst_dec) || (tgt_dst_i == dst_dec))
          dst_d = dst_q;
        else
          dst_d = dst_q + 2'd2;
      end
      2'b10:   dst_d = tgt_dst_i;
      default: dst_d = src_dst_i;
    endcase
  end

  if (PHASE == 1'b0) begin : g_fall
    always_ff @(negedge clk or negedge rst_n) begin
      if (!rst_n) dst_q <= '0;
      else        dst_q <= dst_d;
    end
  end else begin : g_rise
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) dst_q <= '0;
      else        dst_q <= dst_d;
    end
  end

  assign src_dst_o = dst_q;
  assign tgt_dst_o = dst_q;

endmodule
