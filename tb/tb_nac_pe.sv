// Unit test of one processing element (phase 0: characters captured on the
// rising edge, distance updated on the falling edge). The testbench acts as
// both neighbours. Each trial loads a true table entry d into the PE (a
// target character meeting a null source), then presents a real source and
// target pair with travelling distances d +/- 1; the PE must forward both
// characters after the rising edge and hold min(up+1, left+1, d+cost) mod 4
// after the falling edge, where cost is 0 for matching DNA codes and 2
// otherwise, all computed here with full integers.
module tb_nac_pe;
  import nac_pkg::*;
  import tb_nac_ref::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] sci, tci, sco, tco;
  dist_t      sdi, tdi, sdo, tdo;

  nac_pe #(.MODE(MODE_DNA), .PHASE(1'b0)) u_dut (
    .clk, .rst_n,
    .src_chr_i(sci), .src_dst_i(sdi), .tgt_chr_i(tci), .tgt_dst_i(tdi),
    .src_chr_o(sco), .src_dst_o(sdo), .tgt_chr_o(tco), .tgt_dst_o(tdo));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Characters before the rising edge, distances before the falling edge.
  task automatic meet(int sc, int sd, int tc, int td, int exp);
    @(negedge clk); #1 sci = 4'(sc); tci = 4'(tc);
    @(posedge clk); #1;
    check("src fwd", sco, sc); check("tgt fwd", tco, tc);
    sdi = 2'(sd); tdi = 2'(td);
    @(negedge clk); #1;
    check("dist src side", sdo, exp % 4); check("dist tgt side", tdo, exp % 4);
  endtask

  initial begin
    int d, up, lf, best, a, b;
    sci = 0; tci = 0; sdi = 0; tdi = 0;
    #12 rst_n = 1'b1;
    for (int k = 0; k < 500; k++) begin
      d  = $urandom_range(1, 50);
      up = d + ($urandom_range(0, 1) ? 1 : -1);
      lf = d + ($urandom_range(0, 1) ? 1 : -1);
      a  = rand_dna(); b = rand_dna();
      meet(0, 3, rand_dna(), d, d);               // null source: load d
      best = d + (chars_match(1'b1, a, b) ? 0 : 2);
      if (up + 1 < best) best = up + 1;
      if (lf + 1 < best) best = lf + 1;
      meet(a, lf, b, up, best);
      meet(rand_dna(), k % 4, 0, 1, k % 4);       // null target: pass source
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
