// Full-size test of the comparator with every parameter at its default
// (long DNA array, 746 PEs). Runs, each checked against the reference edit
// distance:
//   1. TGCTAAGC against AGACTAGG (distance 6),
//   2. one comparison of two 373-character sequences, the longest the
//      array holds, with its result latency and its rate of cell updates
//      (at least 182 per clock, against 186 million per second at 1 MHz),
//   3. the benchmark of 100 comparisons of 100-character DNA sequences,
//      reporting the clocks taken.
// The host writes one word per clock and leaves N/2 + 2 idle clocks after
// each comparison.
module tb_splash_nac_full;
  import nac_pkg::*;
  import tb_nac_ref::*;

  localparam int N_TOTAL = 746;
  localparam int DRAIN   = N_TOTAL / 2 + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_wr, in_full, out_rd, out_empty, step_err, res_lost;
  fifo_word_t in_word, out_word;
  logic [3:0] row_chr;
  dist_t      row_dst;

  splash_nac u_dut (
    .clk, .rst_n, .in_wr, .in_word, .in_full, .out_rd, .out_word, .out_empty,
    .row_chr_o(row_chr), .row_dst_o(row_dst), .step_err, .res_lost);

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  assign out_rd = !out_empty;
  int     n_res = 0;
  longint t_res;
  int     res_val;
  always @(posedge clk) if (rst_n && out_rd) begin
    n_res++; t_res = cyc; res_val = int'(out_word.data);
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Stream one comparison and wait for its result; returns the clocks from
  // the first word written to the result read.
  task automatic compare(int s[$], int t[$], output longint clocks, output int dval);
    int w = (s.size() > t.size()) ? s.size() : t.size();
    int n_before = n_res;
    longint t0 = cyc;
    for (int i = 0; i < (w == 0 ? 1 : w); i++) begin
      in_wr <= 1'b1;
      in_word <= '0;
      in_word.data[SRC_LSB +: 4] <= (i < s.size()) ? 4'(s[i]) : 4'd0;
      in_word.data[TGT_LSB +: 4] <= (i < t.size()) ? 4'(t[i]) : 4'd0;
      in_word.ctrl[CTRL_END]     <= (i == w - 1) || (w == 0);
      @(posedge clk);
    end
    in_wr <= 1'b0;
    while (n_res == n_before) @(posedge clk);
    clocks = t_res - t0;
    dval = res_val;
    check("distance", dval, edit_distance(1'b1, s, t));
    // remaining drain before the next comparison
    while (cyc - t0 < longint'(w + DRAIN)) @(posedge clk);
  endtask

  function automatic int code(byte c);
    case (c)
      "A": return DNA_A; "C": return DNA_C; "G": return DNA_G; "T": return DNA_T;
      default: return DNA_N;
    endcase
  endfunction

  initial begin
    int s[$], t[$], d;
    longint clk_n, total;
    string a = "TGCTAAGC", b = "AGACTAGG";
    in_wr = 1'b0; in_word = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // 1. worked example
    for (int i = 0; i < a.len(); i++) s.push_back(code(a[i]));
    for (int i = 0; i < b.len(); i++) t.push_back(code(b[i]));
    compare(s, t, clk_n, d);
    check("example distance", d, 6);
    $display("example: distance %0d after %0d clocks", d, clk_n);

    // 2. longest comparison
    s = {}; t = {};
    for (int i = 0; i < N_TOTAL / 2; i++) begin
      s.push_back(rand_dna()); t.push_back(rand_dna());
    end
    compare(s, t, clk_n, d);
    checks++;
    if (clk_n > N_TOTAL / 2 + N_TOTAL / 2 + 8) begin
      failures++;
      $display("FAIL latency %0d", clk_n);
    end
    // Peak rate: 186,000,000 cell updates per second at 1 MHz is 186 per
    // clock; allow 2% for the pipeline ends.
    checks++;
    if ((373 * 373) / clk_n < 182) begin
      failures++;
      $display("FAIL cell-update rate %0d per 100 clocks", (373 * 373 * 100) / clk_n);
    end
    $display("373x373: distance %0d after %0d clocks, %0d cell updates per clock x1000",
             d, clk_n, (373 * 373 * 1000) / clk_n);

    // 3. benchmark: 100 comparisons of 100-long sequences
    total = cyc;
    for (int k = 0; k < 100; k++) begin
      s = {}; t = {};
      for (int i = 0; i < 100; i++) begin
        s.push_back(1 << $urandom_range(0, 3)); t.push_back(1 << $urandom_range(0, 3));
      end
      compare(s, t, clk_n, d);
    end
    total = cyc - total;
    $display("benchmark: 100 comparisons of 100x100 in %0d clocks", total);
    check("error flags", {step_err, res_lost}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
