// Unit test of the first-stage feeder. A queue in the testbench plays the
// input FIFO (first word falls through, removed when fifo_rd is high) and
// is sometimes left empty. For every clock the expected outputs are worked
// out here: the word's characters (or nulls when the queue is empty), the
// running counts of real source and target characters mod 4, restart of
// the counts after an END word, the END flag and the source length on the
// wrap-around outputs.
module tb_seq_feeder;
  import nac_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       empty, rd;
  fifo_word_t word;
  logic [3:0] sc, wc;
  dist_t      sd, wd;
  logic       we;
  logic [CNT_W-1:0] wl;

  seq_feeder #(.MODE(MODE_DNA)) u_dut (
    .clk, .rst_n, .fifo_empty(empty), .fifo_word(word), .fifo_rd(rd),
    .src_chr_o(sc), .src_dst_o(sd), .wrap_chr_o(wc), .wrap_dst_o(wd),
    .wrap_end_o(we), .wrap_src_len_o(wl));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int ns, nt, e_sc, e_tc, e_end;
    ns = 0; nt = 0;
    empty = 1'b1; word = '0;
    #12 rst_n = 1'b1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      empty = ($urandom_range(0, 4) == 0);
      word  = '0;
      word.data[3:0]  = ($urandom_range(0, 3) == 0) ? 4'd0 : 4'(1 << $urandom_range(0, 3));
      word.data[11:8] = ($urandom_range(0, 3) == 0) ? 4'd0 : 4'(1 << $urandom_range(0, 3));
      word.ctrl[CTRL_END] = ($urandom_range(0, 9) == 0);
      #1 check("fifo_rd", rd, !empty);
      e_sc  = empty ? 0 : word.data[3:0];
      e_tc  = empty ? 0 : word.data[11:8];
      e_end = !empty && word.ctrl[CTRL_END];
      if (e_sc != 0) ns++;
      if (e_tc != 0) nt++;
      @(posedge clk); #1;
      check("src chr", sc, e_sc);   check("src dist", sd, ns % 4);
      check("wrap chr", wc, e_tc);  check("wrap dist", wd, nt % 4);
      check("wrap end", we, e_end); check("wrap len", wl, ns);
      if (e_end) begin ns = 0; nt = 0; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
