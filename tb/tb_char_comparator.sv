// Unit test of the character comparator: a DNA instance capturing on the
// rising edge (phase 0) and an ASCII instance capturing on the falling edge
// (phase 1). Random characters, including nulls and wildcards, are applied;
// the pass-through outputs must change only on the capture edge, and the
// null and match flags must follow the DNA shared-bit rule and the ASCII
// equality rule as computed here.
module tb_char_comparator;
  import nac_pkg::*;
  import tb_nac_ref::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] ds_i, dt_i, ds_o, dt_o;
  logic       d_sn, d_tn, d_m;
  logic [6:0] as_i, at_i, as_o, at_o;
  logic       a_sn, a_tn, a_m;

  char_comparator #(.MODE(MODE_DNA), .PHASE(1'b0)) u_dna (
    .clk, .rst_n, .src_chr_i(ds_i), .tgt_chr_i(dt_i), .src_chr_o(ds_o),
    .tgt_chr_o(dt_o), .src_null(d_sn), .tgt_null(d_tn), .match(d_m));
  char_comparator #(.MODE(MODE_ASCII), .PHASE(1'b1)) u_asc (
    .clk, .rst_n, .src_chr_i(as_i), .tgt_chr_i(at_i), .src_chr_o(as_o),
    .tgt_chr_o(at_o), .src_null(a_sn), .tgt_null(a_tn), .match(a_m));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  int ps, pt, qs, qt;
  initial begin
    ds_i = 0; dt_i = 0; as_i = 0; at_i = 0;
    #12 rst_n = 1'b1;
    check("reset src null", d_sn, 1);
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);   // rising-edge instance stable; falling instance captured now
      #1;
      check("asc src", as_o, qs);  check("asc tgt", at_o, qt);
      check("asc snull", a_sn, qs == 0); check("asc tnull", a_tn, qt == 0);
      check("asc match", a_m, chars_match(1'b0, qs, qt));
      check("dna hold src", ds_o, ps);
      // new stimulus for both
      ps = ($urandom_range(0, 5) == 0) ? 0 : rand_dna();
      pt = ($urandom_range(0, 5) == 0) ? 0 : rand_dna();
      qs = ($urandom_range(0, 5) == 0) ? 0 : rand_ascii();
      qt = ($urandom_range(0, 5) == 0) ? 0 : rand_ascii();
      ds_i = 4'(ps); dt_i = 4'(pt);
      @(posedge clk);
      #1;
      check("dna src", ds_o, ps);  check("dna tgt", dt_o, pt);
      check("dna snull", d_sn, ps == 0); check("dna tnull", d_tn, pt == 0);
      check("dna match", d_m, chars_match(1'b1, ps, pt));
      as_i = 7'(qs); at_i = 7'(qt);
    end
    // Directed: every wildcard against every base.
    foreach (ps_list[i]) foreach (ps_list[j]) begin
      @(negedge clk); ds_i = ps_list[i]; dt_i = ps_list[j];
      @(posedge clk); #1;
      check("dna directed", d_m, (ps_list[i] & ps_list[j]) != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] ps_list[7] = '{DNA_A, DNA_C, DNA_G, DNA_T, DNA_R, DNA_Y, DNA_N};

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
