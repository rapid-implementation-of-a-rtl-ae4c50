// Unit test of a stage of PEs (7 PEs, phases 0,1,...,0). The testbench
// plays the two neighbouring PEs itself: it presents new source and target
// characters on the falling edge and their travelling distances on the
// following rising edge. Each trial streams a random DNA source and target
// (up to 3 characters each, led by nulls carrying d(0,0) = 0) and checks
// that the real source characters leave the right end carrying the last
// column d(i,n) mod 4, and the real target characters leave the left end
// carrying the last row d(m,j) mod 4, both from a full-width reference
// table computed here.
module tb_pe_chain;
  import nac_pkg::*;
  import tb_nac_ref::*;

  localparam int N = 7;
  localparam int L = N / 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] sci, tci, sco, tco;
  dist_t      sdi, tdi, sdo, tdo;

  pe_chain #(.MODE(MODE_DNA), .N_PE(N), .FIRST_PHASE(1'b0)) u_dut (
    .clk, .rst_n,
    .src_chr_i(sci), .src_dst_i(sdi), .src_chr_o(sco), .src_dst_o(sdo),
    .tgt_chr_i(tci), .tgt_dst_i(tdi), .tgt_chr_o(tco), .tgt_dst_o(tdo));

  int col_q[$], row_q[$];   // expected exit distances, in order

  // Full table, returns last column (col) and last row (row).
  task automatic table_edges(int s[$], int t[$], output int col[$], output int row[$]);
    int d[$][$];
    int m = s.size(), n = t.size();
    d = {};
    for (int i = 0; i <= m; i++) begin
      int r[$];
      for (int j = 0; j <= n; j++) begin
        if (i == 0) r.push_back(j);
        else if (j == 0) r.push_back(i);
        else begin
          int b = d[i-1][j] + 1;
          if (r[j-1] + 1 < b) b = r[j-1] + 1;
          if (d[i-1][j-1] + (chars_match(1'b1, s[i-1], t[j-1]) ? 0 : 2) < b)
            b = d[i-1][j-1] + (chars_match(1'b1, s[i-1], t[j-1]) ? 0 : 2);
          r.push_back(b);
        end
      end
      d.push_back(r);
    end
    col = {}; row = {};
    for (int i = 1; i <= m; i++) col.push_back(d[i][n]);
    for (int j = 1; j <= n; j++) row.push_back(d[m][j]);
  endtask

  // One clock of stimulus: characters on the falling edge, distances on the
  // next rising edge.
  task automatic feed(int sc, int sd, int tc, int td);
    @(negedge clk); sci = 4'(sc); tci = 4'(tc);
    @(posedge clk); sdi <= 2'(sd); tdi <= 2'(td);
  endtask

  // Exit monitor: pairs sampled on the rising edge.
  always @(posedge clk) if (rst_n) begin
    if (sco != 0) begin
      checks++;
      if (col_q.size() == 0 || int'(sdo) != col_q[0] % 4) begin
        failures++;
        $display("FAIL source exit: dist %0d expected %0d", sdo,
                 col_q.size() ? col_q[0] % 4 : -1);
      end
      if (col_q.size()) void'(col_q.pop_front());
    end
    if (tco != 0) begin
      checks++;
      if (row_q.size() == 0 || int'(tdo) != row_q[0] % 4) begin
        failures++;
        $display("FAIL target exit: dist %0d expected %0d", tdo,
                 row_q.size() ? row_q[0] % 4 : -1);
      end
      if (row_q.size()) void'(row_q.pop_front());
    end
  end

  initial begin
    int s[$], t[$], col[$], row[$];
    int m, n, w;
    sci = 0; tci = 0; sdi = 0; tdi = 0;
    #12 rst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      m = $urandom_range(1, L); n = $urandom_range(1, L);
      s = {}; t = {};
      for (int i = 0; i < m; i++) s.push_back(rand_dna());
      for (int j = 0; j < n; j++) t.push_back(rand_dna());
      table_edges(s, t, col, row);
      col_q = col; row_q = row;
      w = (m > n) ? m : n;
      for (int i = 0; i < w; i++)
        feed(i < m ? s[i] : 0, i < m ? i + 1 : m, i < n ? t[i] : 0, i < n ? i + 1 : n);
      for (int i = 0; i < N + 2; i++) feed(0, 0, 0, 0);
      checks++;
      if (col_q.size() || row_q.size()) begin
        failures++;
        $display("FAIL trial %0d: %0d/%0d exits missing", k, col_q.size(), row_q.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
