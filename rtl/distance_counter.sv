// Up/down counter of the last array stage (X31) that rebuilds the final
// distance.
//
// The array only carries distances mod 4. A source character leaving the
// right end of the array carries d(i,n) mod 4, the last column of the table,
// and consecutive entries of a column differ by exactly 1. The counter
// starts from d(0,n) = n by counting the real target characters entering
// the last stage, then steps +1 or -1 for each real source character
// leaving the array, according to whether its mod-4 distance is one above
// or one below the counter's low two bits. After the last source character
// has left it holds d(m,n).
//
// The comparison's END flag and source length m arrive over the wrap-around
// path; once m real source characters have left, the counter's value is
// written to the output FIFO (one clock after the last one leaves) and the
// counter clears for the next comparison. step_err latches a mod-4 step that
// is neither +1 nor -1 (a sequence too long for the array, or two
// comparisons overlapping); res_lost latches a result dropped because the
// output FIFO was full. Rising-edge logic throughout.
// Counting on the last stage follows the source design; the start value
// from the target count, the END/length handshake and the error flags are
// choices of this implementation.
module distance_counter
  import nac_pkg::*;
#(
  parameter char_mode_e MODE   = MODE_DNA,
  parameter int         CHAR_W = char_width(MODE)
) (
  input  logic              clk,
  input  logic              rst_n,
  // target stream entering the last stage (wrap-around path)
  input  logic [CHAR_W-1:0] tgt_chr_i,
  input  logic              end_i,
  input  logic [CNT_W-1:0]  src_len_i,
  // source stream leaving the array
  input  logic [CHAR_W-1:0] src_chr_i,
  input  dist_t             src_dst_i,
  // result to the output FIFO
  input  logic              out_full,
  output logic              res_wr,
  output logic [CNT_W-1:0]  res_dist,
  output logic              step_err,
  output logic              res_lost
);

  logic [CNT_W-1:0] dist_q, exited_q, expect_q, dist_base, dist_next;
  logic             pending_q, emit, src_real, tgt_real;
  dist_t            lo_up, lo_dn;

  assign tgt_real = (tgt_chr_i != '0);
  assign src_real = (src_chr_i != '0);
  assign emit     = pending_q && (exited_q == expect_q);
  assign lo_up    = dist_q[1:0] + 2'd1;
  assign lo_dn    = dist_q[1:0] - 2'd1;

  always_comb begin
    dist_base = emit ? '0 : dist_q;
    dist_next = dist_base + CNT_W'(tgt_real);
    if (src_real) begin
      if (src_dst_i == lo_up)      dist_next = dist_next + 1'b1;
      else if (src_dst_i == lo_dn) dist_next = dist_next - 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dist_q    <= '0;
      exited_q  <= '0;
      expect_q  <= '0;
      pending_q <= 1'b0;
      step_err  <= 1'b0;
      res_lost  <= 1'b0;
    end else begin
      dist_q   <= dist_next;
      exited_q <= (emit ? '0 : exited_q) + CNT_W'(src_real);
      if (end_i) begin
        pending_q <= 1'b1;
        expect_q  <= src_len_i;
      end else if (emit) begin
        pending_q <= 1'b0;
      end
      if (src_real && src_dst_i != lo_up && src_dst_i != lo_dn) step_err <= 1'b1;
      if (emit && out_full) res_lost <= 1'b1;
    end
  end

  assign res_wr   = emit && !out_full;
  assign res_dist = dist_q;

endmodule
