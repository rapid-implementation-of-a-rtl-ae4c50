// Test harness for the whole comparator at one parameter setting.
//
// Generates N_CMP random comparisons (random lengths up to what the array
// holds, DNA with wildcards or a small ASCII alphabet), writes them into
// the input FIFO with null filler words and idle cycles mixed in, leaves the
// required drain gap between comparisons, reads the results from the output
// FIFO and checks each against the reference edit distance. It also checks
// the result latency against N/2 + max(m,n) + a few clocks and counts how
// often each mechanism of the design was exercised. Raises done when all
// results are in; checks/failures/mechanism counts are read by the caller.
module tb_nac_harness
  import nac_pkg::*;
  import tb_nac_ref::*;
#(
  parameter char_mode_e MODE     = MODE_DNA,
  parameter int         N_STAGES = 4,
  parameter int         PE_FIRST = 3,
  parameter int         PE_MID   = 4,
  parameter int         PE_LAST  = 3,
  parameter int         N_CMP    = 20
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_results,
  output int   n_up,
  output int   n_down,
  output int   n_idle_inject,
  output int   n_null_words,
  output int   n_wild,
  output int   n_unequal,
  output int   n_full_len
);

  localparam int CHAR_W  = char_width(MODE);
  localparam int N_TOTAL = PE_FIRST + (N_STAGES - 2) * PE_MID + PE_LAST;
  localparam int L_MAX   = N_TOTAL / 2;     // longest stream per comparison
  localparam int DRAIN   = N_TOTAL / 2 + 2; // idle clocks between comparisons
  localparam bit DNA     = (MODE == MODE_DNA);

  logic              in_wr, in_full, out_rd, out_empty, step_err, res_lost;
  fifo_word_t        in_word, out_word;
  logic [CHAR_W-1:0] row_chr;
  dist_t             row_dst;

  splash_nac #(
    .MODE(MODE), .N_STAGES(N_STAGES),
    .PE_FIRST(PE_FIRST), .PE_MID(PE_MID), .PE_LAST(PE_LAST), .FIFO_DEPTH(16)
  ) u_dut (
    .clk, .rst_n,
    .in_wr, .in_word, .in_full,
    .out_rd, .out_word, .out_empty,
    .row_chr_o(row_chr), .row_dst_o(row_dst),
    .step_err, .res_lost
  );

  int     exp_q[$];
  longint start_q[$];
  int     len_q[$];
  longint cyc;
  logic   active;   // a comparison is being streamed

  always_ff @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  // ------------------------------------------------------------ stimulus
  initial begin
    int s[$], t[$];
    int m, n, words, gaps, k;
    in_wr = 1'b0; in_word = '0; active = 1'b0;
    n_idle_inject = 0; n_null_words = 0; n_wild = 0; n_unequal = 0; n_full_len = 0;
    @(posedge rst_n);
    repeat (3) @(posedge clk);
    for (int c = 0; c < N_CMP; c++) begin
      // Stream budget: words plus idle cycles must fit in L_MAX.
      gaps = (c % 3 == 1) ? 2 : 0;
      if (c == 0)      begin m = L_MAX; n = L_MAX; gaps = 0; end
      else if (c == 1) begin m = L_MAX - 2; n = 1; end
      else if (c == 2) begin m = 0; n = 3; end
      else begin
        m = $urandom_range(0, L_MAX - gaps);
        n = $urandom_range(0, L_MAX - gaps);
      end
      words = (m > n) ? m : n;
      if (words + gaps > L_MAX) gaps = L_MAX - words;
      s = {}; t = {};
      for (int i = 0; i < m; i++) s.push_back(DNA ? rand_dna() : rand_ascii());
      for (int j = 0; j < n; j++) t.push_back(DNA ? rand_dna() : rand_ascii());
      foreach (s[i]) if (DNA && $countones(s[i]) > 1) n_wild++;
      foreach (t[j]) if (DNA && $countones(t[j]) > 1) n_wild++;
      if (m != n) n_unequal++;
      if (words == L_MAX) n_full_len++;
      exp_q.push_back(edit_distance(DNA, s, t));
      len_q.push_back(words + gaps);
      start_q.push_back(cyc + 2);  // first word is read two clocks later
      active = 1'b1;
      // The gap positions: idle clocks (no write) and, in the same budget,
      // all-null words in place of some idle clocks.
      k = 0;
      for (int w = 0; w < (words == 0 ? 1 : words); w++) begin
        if (gaps > 0 && w == words / 2) begin
          for (int g = 0; g < gaps; g++) begin
            if (g % 2 == 0) begin
              in_wr <= 1'b0;            // idle: the array gets null filler
              n_idle_inject++;
            end else begin
              in_wr <= 1'b1; in_word <= '0;   // explicit null filler word
              n_null_words++;
            end
            @(posedge clk);
          end
        end
        in_wr <= 1'b1;
        in_word.data <= '0;
        in_word.ctrl <= '0;
        in_word.data[SRC_LSB +: CHAR_W] <= (w < m) ? CHAR_W'(s[w]) : '0;
        in_word.data[TGT_LSB +: CHAR_W] <= (w < n) ? CHAR_W'(t[w]) : '0;
        if (w == (words == 0 ? 0 : words - 1)) in_word.ctrl[CTRL_END] <= 1'b1;
        @(posedge clk);
      end
      in_wr <= 1'b0;
      active = 1'b0;
      repeat (DRAIN) @(posedge clk);
    end
  end

  // ------------------------------------------------------------ checking
  // The output FIFO is drained whenever it holds a result.
  assign out_rd = !out_empty;

  initial begin
    checks = 0; failures = 0; n_results = 0; done = 1'b0;
  end

  always @(posedge clk) if (rst_n && out_rd) begin
    int exp_d, lim;
    longint lat;
    exp_d = exp_q.pop_front();
    lat   = cyc - start_q.pop_front();
    lim   = (N_TOTAL + 1) / 2 + len_q.pop_front() + 8;
    checks++;
    if (out_word.data != 32'(exp_d) || out_word.ctrl != RES_CTRL) begin
      failures++;
      $display("FAIL cmp %0d: distance %0d expected %0d", n_results,
               out_word.data, exp_d);
    end
    checks++;
    if (lat > lim) begin
      failures++;
      $display("FAIL cmp %0d: latency %0d above %0d", n_results, lat, lim);
    end
    n_results++;
    if (n_results == N_CMP) begin
      checks++;
      if (step_err || res_lost) begin
        failures++;
        $display("FAIL error flags step_err=%0b res_lost=%0b", step_err, res_lost);
      end
      done = 1'b1;
    end
  end

  // Up and down steps of the distance counter.
  initial begin n_up = 0; n_down = 0; end
  always @(posedge clk) if (rst_n) begin
    if (u_dut.u_counter.src_real) begin
      if (u_dut.u_counter.src_dst_i == u_dut.u_counter.lo_up) n_up++;
      if (u_dut.u_counter.src_dst_i == u_dut.u_counter.lo_dn) n_down++;
    end
  end

endmodule
