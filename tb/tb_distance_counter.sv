// Unit test of the output-end up/down counter. For each trial the testbench
// invents a last column of a distance table (d(0,n) = n, then steps of +1
// or -1), sends n real target characters with the END flag and source
// length m on the last one, then presents the m real source characters
// with d(i,n) mod 4, with null characters interleaved. The counter must
// write exactly d(m,n) to the output FIFO one clock after the last source
// character, raise no step error, and flag a result lost to a full FIFO
// in the final trial; a step of 2 must raise step_err.
module tb_distance_counter;
  import nac_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] tc, sc;
  logic       en, full, wr, serr, lost;
  logic [CNT_W-1:0] len, res;
  dist_t      sd;

  distance_counter #(.MODE(MODE_DNA)) u_dut (
    .clk, .rst_n, .tgt_chr_i(tc), .end_i(en), .src_len_i(len),
    .src_chr_i(sc), .src_dst_i(sd), .out_full(full), .res_wr(wr),
    .res_dist(res), .step_err(serr), .res_lost(lost));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int n_wr;
  always @(posedge clk) if (rst_n && wr) n_wr++;

  task automatic tick();
    @(posedge clk); #1;
  endtask

  initial begin
    int m, n, d;
    n_wr = 0;
    tc = 0; sc = 0; sd = 0; en = 0; len = 0; full = 0;
    #12 rst_n = 1'b1;
    tick();
    for (int k = 0; k < 200; k++) begin
      m = $urandom_range(0, 40); n = $urandom_range(0, 40);
      if (k == 199) full = 1'b1;
      // targets
      for (int j = 1; j <= (n == 0 ? 1 : n); j++) begin
        tc = (n == 0) ? 4'd0 : DNA_G;
        en = (j == (n == 0 ? 1 : n)); len = CNT_W'(m);
        tick();
      end
      tc = 0; en = 0;
      if (m > 0) repeat ($urandom_range(0, 3)) tick();
      // sources leaving the array
      d = n;
      n_wr = 0;
      for (int i = 1; i <= m; i++) begin
        if ($urandom_range(0, 2) == 0) tick();   // null filler
        if (d == 0 || $urandom_range(0, 1)) d++; else d--;
        sc = DNA_T; sd = 2'(d);
        tick();
        sc = 0;
        if (i < m) check("no early result", wr, 0);
      end
      sc = 0;
      if (!full) begin
        check("result write", wr, 1);
        check("result value", res, d);
      end
      tick();
      check("one result", n_wr, full ? 0 : 1);
      check("no step error", serr, 0);
      repeat (2) tick();
    end
    check("result lost flag", lost, 1);
    // A step of 2 is an error.
    full = 0;
    tc = DNA_A; tick(); tc = 0;
    sc = DNA_C; sd = 2'd3; tick(); sc = 0;
    check("step error", serr, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
