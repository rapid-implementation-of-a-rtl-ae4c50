// Input logic of the first array stage (X0).
//
// Each clock it takes one word from the input FIFO if one is waiting, else
// it injects a pair of null filler characters. A word carries one source
// and one target character. The feeder attaches to each character its
// travelling distance from the first column / first row of the distance
// table, d(i,0) = i and d(0,j) = j (unit deletion and insertion cost), kept
// as full counters whose low two bits travel with the characters. Null
// characters do not advance the counters. The word marked END closes a
// comparison: the counters restart at zero for the following words, so the
// fillers that lead the next comparison carry d(0,0) = 0.
//
// Outputs, all registered on the rising edge, one pair per clock:
//   src_chr_o/src_dst_o  source stream, into the left end of the array
//   wrap_*               target stream plus END flag and source length,
//                        sent over the wrap-around path to the last stage
// Injecting both streams from the first stage and turning the target stream
// around over the wrap-around path follows the source design; word layout,
// END flag, counters and the null injection on an empty FIFO are choices
// of this implementation.
module seq_feeder
  import nac_pkg::*;
#(
  parameter char_mode_e MODE   = MODE_DNA,
  parameter int         CHAR_W = char_width(MODE)
) (
  input  logic              clk,
  input  logic              rst_n,
  // input FIFO (first-word-fall-through)
  input  logic              fifo_empty,
  input  fifo_word_t        fifo_word,
  output logic              fifo_rd,
  // source stream
  output logic [CHAR_W-1:0] src_chr_o,
  output dist_t             src_dst_o,
  // wrap-around path to the last stage
  output logic [CHAR_W-1:0] wrap_chr_o,
  output dist_t             wrap_dst_o,
  output logic              wrap_end_o,
  output logic [CNT_W-1:0]  wrap_src_len_o
);

  logic [CNT_W-1:0]  src_cnt, tgt_cnt, src_next, tgt_next;
  logic [CHAR_W-1:0] src_chr, tgt_chr;
  logic              take, last;

  assign take    = !fifo_empty;
  assign fifo_rd = take;

  always_comb begin
    src_chr  = take ? fifo_word.data[SRC_LSB +: CHAR_W] : '0;
    tgt_chr  = take ? fifo_word.data[TGT_LSB +: CHAR_W] : '0;
    last     = take && fifo_word.ctrl[CTRL_END];
    src_next = src_cnt + CNT_W'(src_chr != '0);
    tgt_next = tgt_cnt + CNT_W'(tgt_chr != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_cnt        <= '0;
      tgt_cnt        <= '0;
      src_chr_o      <= '0;
      src_dst_o      <= '0;
      wrap_chr_o     <= '0;
      wrap_dst_o     <= '0;
      wrap_end_o     <= 1'b0;
      wrap_src_len_o <= '0;
    end else begin
      src_chr_o      <= src_chr;
      src_dst_o      <= src_next[1:0];
      wrap_chr_o     <= tgt_chr;
      wrap_dst_o     <= tgt_next[1:0];
      wrap_end_o     <= last;
      wrap_src_len_o <= src_next;
      src_cnt        <= last ? '0 : src_next;
      tgt_cnt        <= last ? '0 : tgt_next;
    end
  end

endmodule
