// Runs the three other array versions at their full sizes, each on random
// comparisons up to the longest sequences it holds, checked against the
// reference edit distance:
//   short DNA   :  4 + 30 x  8 +  4 = 248 PEs, 4-bit characters
//   short ASCII :  8 + 30 x  8 +  8 = 256 PEs, 7-bit characters
//   long ASCII  :  9 + 30 x 16 +  9 = 498 PEs, 7-bit characters
// (the long DNA array, 746 PEs, is the default and has its own test).
module tb_splash_nac_versions;
  import nac_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done[3];
  int   ck[3], fl[3], nr[3], up[3], dn[3], id[3], nw[3], wd[3], ue[3], fu[3];
  int   checks = 0, failures = 0;

  tb_nac_harness #(.MODE(MODE_DNA), .N_STAGES(32), .PE_FIRST(4), .PE_MID(8),
                   .PE_LAST(4), .N_CMP(6)) u_dna_short (
    .clk, .rst_n, .done(done[0]), .checks(ck[0]), .failures(fl[0]),
    .n_results(nr[0]), .n_up(up[0]), .n_down(dn[0]), .n_idle_inject(id[0]),
    .n_null_words(nw[0]), .n_wild(wd[0]), .n_unequal(ue[0]), .n_full_len(fu[0]));

  tb_nac_harness #(.MODE(MODE_ASCII), .N_STAGES(32), .PE_FIRST(8), .PE_MID(8),
                   .PE_LAST(8), .N_CMP(6)) u_ascii_short (
    .clk, .rst_n, .done(done[1]), .checks(ck[1]), .failures(fl[1]),
    .n_results(nr[1]), .n_up(up[1]), .n_down(dn[1]), .n_idle_inject(id[1]),
    .n_null_words(nw[1]), .n_wild(wd[1]), .n_unequal(ue[1]), .n_full_len(fu[1]));

  tb_nac_harness #(.MODE(MODE_ASCII), .N_STAGES(32), .PE_FIRST(9), .PE_MID(16),
                   .PE_LAST(9), .N_CMP(6)) u_ascii_long (
    .clk, .rst_n, .done(done[2]), .checks(ck[2]), .failures(fl[2]),
    .n_results(nr[2]), .n_up(up[2]), .n_down(dn[2]), .n_idle_inject(id[2]),
    .n_null_words(nw[2]), .n_wild(wd[2]), .n_unequal(ue[2]), .n_full_len(fu[2]));

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2]);
    for (int v = 0; v < 3; v++) begin
      checks += ck[v] + 1;
      failures += fl[v];
      if (nr[v] != 6 || fu[v] == 0) begin
        failures++;
        $display("FAIL version %0d: %0d results, %0d full-length", v, nr[v], fu[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
