// Systolic edit-distance comparator on a 32-stage linear array.
//
// The host packs a source and a target sequence, one character of each per
// 32-bit word, into the input FIFO. The first stage (X0) feeds the source
// characters into the left end of a chain of processing elements and sends
// the target characters over the wrap-around path to the last stage (X31),
// which feeds them into the right end. The two streams cross; each time a
// source and a target character meet in a PE, that PE computes one entry of
// the distance table modulo 4. Source characters leave the right end
// carrying the last column of the table, from which an up/down counter on
// X31 rebuilds the full final distance and writes it to the output FIFO.
//
// Defaults are the long DNA array: 13 PEs on X0, 24 on each of X1..X30 and
// 13 on X31, 746 PEs in all. The other arrays of the source design are
// parameter settings: short DNA (4/8/4), short ASCII (8/8/8, MODE_ASCII),
// long ASCII (9/16/9, MODE_ASCII). Each sequence of a comparison may be up
// to N_TOTAL/2 characters long (373 for the default), and the FIFO must be
// given at least N_TOTAL/2 + 2 null words between the END word of one
// comparison and the first word of the next.
//
// Timing: one input word per clock, PEs alternate between rising-edge and
// falling-edge character capture, every PE does one cell update per clock.
// The result appears in the output FIFO about N_TOTAL/2 + max(m,n) clocks
// after the first word of a comparison is read.
//
// Ports: host side of the two FIFOs (plain signals); the last row of the
// table, carried by the target characters leaving X0, is brought out as
// row_chr_o/row_dst_o; step_err and res_lost are sticky error flags.
module splash_nac
  import nac_pkg::*;
#(
  parameter char_mode_e MODE       = MODE_DNA,
  parameter int         CHAR_W     = char_width(MODE),
  parameter int         N_STAGES   = 32,
  parameter int         PE_FIRST   = 13,
  parameter int         PE_MID     = 24,
  parameter int         PE_LAST    = 13,
  parameter int         FIFO_DEPTH = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  // input FIFO, host side
  input  logic              in_wr,
  input  fifo_word_t        in_word,
  output logic              in_full,
  // output FIFO, host side
  input  logic              out_rd,
  output fifo_word_t        out_word,
  output logic              out_empty,
  // target stream leaving the left end of the array (last table row)
  output logic [CHAR_W-1:0] row_chr_o,
  output dist_t             row_dst_o,
  // sticky error flags
  output logic              step_err,
  output logic              res_lost
);

  localparam int N_TOTAL = PE_FIRST + (N_STAGES - 2) * PE_MID + PE_LAST;
  localparam bit END_PHASE = 1'(N_TOTAL % 2);  // phase of a PE after the last

  // Index of the first PE of stage s in the whole array.
  function automatic int stage_base(int s);
    return (s == 0) ? 0 : PE_FIRST + (s - 1) * PE_MID;
  endfunction

  function automatic int stage_size(int s);
    return (s == 0) ? PE_FIRST : (s == N_STAGES - 1) ? PE_LAST : PE_MID;
  endfunction

  // ---------------------------------------------------------------- input
  fifo_word_t in_q;
  logic       in_empty, in_rd;

  splash_fifo #(.WIDTH($bits(fifo_word_t)), .DEPTH(FIFO_DEPTH)) u_fifo_in (
    .clk, .rst_n,
    .wr_en(in_wr), .wr_data(in_word), .full(in_full),
    .rd_en(in_rd), .rd_data(in_q), .empty(in_empty), .count()
  );

  // ----------------------------------------------------- X0 feeder, wrap path
  logic [CHAR_W-1:0] feed_src_chr, wrap_chr;
  dist_t             feed_src_dst, wrap_dst;
  logic              wrap_end;
  logic [CNT_W-1:0]  wrap_len;

  seq_feeder #(.MODE(MODE), .CHAR_W(CHAR_W)) u_feeder (
    .clk, .rst_n,
    .fifo_empty(in_empty), .fifo_word(in_q), .fifo_rd(in_rd),
    .src_chr_o(feed_src_chr), .src_dst_o(feed_src_dst),
    .wrap_chr_o(wrap_chr), .wrap_dst_o(wrap_dst),
    .wrap_end_o(wrap_end), .wrap_src_len_o(wrap_len)
  );

  // ------------------------------------------------------------ PE stages
  // Link s is the boundary to the left of stage s; link N_STAGES is the
  // right end of the array.
  logic [CHAR_W-1:0] l_src_chr [N_STAGES+1];
  dist_t             l_src_dst [N_STAGES+1];
  logic [CHAR_W-1:0] l_tgt_chr [N_STAGES+1];
  dist_t             l_tgt_dst [N_STAGES+1];

  // Source stream enters PE 0 (phase 0) from a phase-1 launcher.
  stream_launch #(.CHAR_W(CHAR_W), .PHASE(1'b1)) u_launch_src (
    .clk, .rst_n,
    .chr_i(feed_src_chr), .dst_i(feed_src_dst),
    .chr_o(l_src_chr[0]), .dst_o(l_src_dst[0])
  );

  // Target stream, after the wrap-around path, enters the last PE.
  stream_launch #(.CHAR_W(CHAR_W), .PHASE(END_PHASE)) u_launch_tgt (
    .clk, .rst_n,
    .chr_i(wrap_chr), .dst_i(wrap_dst),
    .chr_o(l_tgt_chr[N_STAGES]), .dst_o(l_tgt_dst[N_STAGES])
  );

  for (genvar s = 0; s < N_STAGES; s++) begin : g_stage
    pe_chain #(
      .MODE       (MODE),
      .CHAR_W     (CHAR_W),
      .N_PE       (stage_size(s)),
      .FIRST_PHASE(1'(stage_base(s) % 2))
    ) u_chain (
      .clk, .rst_n,
      .src_chr_i(l_src_chr[s]),   .src_dst_i(l_src_dst[s]),
      .src_chr_o(l_src_chr[s+1]), .src_dst_o(l_src_dst[s+1]),
      .tgt_chr_i(l_tgt_chr[s+1]), .tgt_dst_i(l_tgt_dst[s+1]),
      .tgt_chr_o(l_tgt_chr[s]),   .tgt_dst_o(l_tgt_dst[s])
    );
  end

  assign row_chr_o = l_tgt_chr[0];
  assign row_dst_o = l_tgt_dst[0];

  // ----------------------------------------------------- X31 result counter
  logic [CHAR_W-1:0] exit_chr;
  dist_t             exit_dst;
  logic              out_full, res_wr;
  logic [CNT_W-1:0]  res_dist;
  fifo_word_t        res_word;

  stream_sink #(.CHAR_W(CHAR_W), .PHASE(END_PHASE)) u_sink (
    .clk, .rst_n,
    .chr_i(l_src_chr[N_STAGES]), .dst_i(l_src_dst[N_STAGES]),
    .chr_o(exit_chr), .dst_o(exit_dst)
  );

  distance_counter #(.MODE(MODE), .CHAR_W(CHAR_W)) u_counter (
    .clk, .rst_n,
    .tgt_chr_i(wrap_chr), .end_i(wrap_end), .src_len_i(wrap_len),
    .src_chr_i(exit_chr), .src_dst_i(exit_dst),
    .out_full, .res_wr, .res_dist, .step_err, .res_lost
  );

  assign res_word.ctrl = RES_CTRL;
  assign res_word.data = WORD_W'(res_dist);

  splash_fifo #(.WIDTH($bits(fifo_word_t)), .DEPTH(FIFO_DEPTH)) u_fifo_out (
    .clk, .rst_n,
    .wr_en(res_wr), .wr_data(res_word), .full(out_full),
    .rd_en(out_rd), .rd_data(out_word), .empty(out_empty), .count()
  );

endmodule
