// Unit test of the distance FSM. For each trial a true table entry d is
// chosen, the FSM is loaded with d mod 4 through a null-source step, then a
// real step is applied with travelling distances d +/- 1 and a random match
// flag; the new state must equal min(up+1, left+1, d + (match ? 0 : 2))
// mod 4, computed here with full integers. Null-target and both-null steps
// must pass the source distance. Both phases are tested: phase 0 updates on
// the falling edge, phase 1 on the rising edge.
module tb_dist_fsm;
  import nac_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  dist_t sd, td, o0s, o0t, o1s, o1t;
  logic  sn, tn, mt;

  dist_fsm #(.PHASE(1'b0)) u_p0 (.clk, .rst_n, .src_dst_i(sd), .tgt_dst_i(td),
    .src_null(sn), .tgt_null(tn), .match(mt), .src_dst_o(o0s), .tgt_dst_o(o0t));
  dist_fsm #(.PHASE(1'b1)) u_p1 (.clk, .rst_n, .src_dst_i(sd), .tgt_dst_i(td),
    .src_null(sn), .tgt_null(tn), .match(mt), .src_dst_o(o1s), .tgt_dst_o(o1t));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Apply inputs, let both phases update once (one full clock), check both.
  task automatic step(logic s_n, logic t_n, logic m, int s_d, int t_d, int exp);
    sd = 2'(s_d); td = 2'(t_d); sn = s_n; tn = t_n; mt = m;
    @(posedge clk); @(negedge clk); #1;
    check("phase0", o0s, exp % 4); check("phase0 tgt", o0t, exp % 4);
    check("phase1", o1s, exp % 4); check("phase1 tgt", o1t, exp % 4);
  endtask

  initial begin
    int d, up, lf, e, best;
    logic m;
    sd = 0; td = 0; sn = 1; tn = 1; mt = 0;
    #12 rst_n = 1'b1;
    check("reset", o0s, 0);
    @(negedge clk);
    for (int k = 0; k < 500; k++) begin
      d  = $urandom_range(1, 60);
      up = d + ($urandom_range(0, 1) ? 1 : -1);   // d(i-1,j)
      lf = d + ($urandom_range(0, 1) ? 1 : -1);   // d(i,j-1)
      m  = 1'($urandom_range(0, 1));
      step(1'b1, 1'b0, 1'b0, 0, d, d);            // load d via null source
      best = d + (m ? 0 : 2);
      if (up + 1 < best) best = up + 1;
      if (lf + 1 < best) best = lf + 1;
      step(1'b0, 1'b0, m, lf, up, best);
      e = $urandom_range(0, 3);
      if (k % 2) step(1'b0, 1'b1, 1'b0, e, 0, e); // null target
      else       step(1'b1, 1'b1, 1'b1, e, 3, e); // both null
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
