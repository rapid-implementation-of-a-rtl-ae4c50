// Unit test of the FIFO (depth 8 here): random writes and reads that
// respect full and empty, checked against a queue model for data order,
// the full/empty flags and the word count, with phases that fill the FIFO
// completely and drain it completely.
module tb_splash_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int D = 8;
  logic        wr, rd, full, empty;
  logic [35:0] wd, rdat;
  logic [3:0]  cnt;
  logic [35:0] model[$];

  splash_fifo #(.WIDTH(36), .DEPTH(D)) u_dut (
    .clk, .rst_n, .wr_en(wr), .wr_data(wd), .full, .rd_en(rd),
    .rd_data(rdat), .empty, .count(cnt));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  int n_full, n_empty;
  initial begin
    int bias;
    wr = 0; rd = 0; wd = 0; n_full = 0; n_empty = 0;
    #12 rst_n = 1'b1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      check("count", cnt, model.size());
      check("full", full, model.size() == D);
      check("empty", empty, model.size() == 0);
      if (full) n_full++;
      if (empty) n_empty++;
      if (!empty) check("head", rdat, model[0]);
      bias = ((k / 100) % 2) ? 3 : 1;
      wr = !full && ($urandom_range(0, 3) < bias + 0);
      rd = !empty && ($urandom_range(0, 3) >= bias);
      wd = {$urandom, $urandom} & 36'hF_FFFF_FFFF;
      @(posedge clk);
      if (rd) void'(model.pop_front());
      if (wr) model.push_back(wd);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin
      failures++;
      $display("FAIL full (%0d) or empty (%0d) never reached", n_full, n_empty);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
