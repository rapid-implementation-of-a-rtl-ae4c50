// End-to-end test of the comparator at reduced array sizes: a DNA array
// with an even number of PEs (4 stages, 3+4+4+3 = 14 PEs) and an ASCII
// array with an odd number (3 stages, 3+4+2 = 9 PEs), so both boundary
// timings of the two-phase PE chain are exercised. Random comparisons are
// checked against a reference edit distance, and each mechanism (wildcard
// matches, null filler words, idle-FIFO filler, unequal lengths, full-length
// streams, up and down counter steps, result output) must occur.
module tb_splash_nac;
  import nac_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done_a, done_b;
  int   ck_a, fl_a, nr_a, up_a, dn_a, id_a, nw_a, wd_a, ue_a, fu_a;
  int   ck_b, fl_b, nr_b, up_b, dn_b, id_b, nw_b, wd_b, ue_b, fu_b;
  int   checks, failures;

  tb_nac_harness #(.MODE(MODE_DNA), .N_STAGES(4), .PE_FIRST(3), .PE_MID(4),
                   .PE_LAST(3), .N_CMP(40)) u_dna (
    .clk, .rst_n, .done(done_a), .checks(ck_a), .failures(fl_a),
    .n_results(nr_a), .n_up(up_a), .n_down(dn_a), .n_idle_inject(id_a),
    .n_null_words(nw_a), .n_wild(wd_a), .n_unequal(ue_a), .n_full_len(fu_a));

  tb_nac_harness #(.MODE(MODE_ASCII), .N_STAGES(3), .PE_FIRST(3), .PE_MID(4),
                   .PE_LAST(2), .N_CMP(40)) u_ascii (
    .clk, .rst_n, .done(done_b), .checks(ck_b), .failures(fl_b),
    .n_results(nr_b), .n_up(up_b), .n_down(dn_b), .n_idle_inject(id_b),
    .n_null_words(nw_b), .n_wild(wd_b), .n_unequal(ue_b), .n_full_len(fu_b));

  task automatic need(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("  %-28s %0d", what, count);
  endtask

  initial begin
    checks = 0; failures = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (done_a && done_b);
    checks += ck_a + ck_b;
    failures += fl_a + fl_b;
    need("DNA results", nr_a);
    need("ASCII results", nr_b);
    need("DNA wildcard characters", wd_a);
    need("counter up steps", up_a + up_b);
    need("counter down steps", dn_a + dn_b);
    need("idle-FIFO null injection", id_a + id_b);
    need("null filler words", nw_a + nw_b);
    need("unequal lengths", ue_a + ue_b);
    need("full-length streams", fu_a + fu_b);
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
