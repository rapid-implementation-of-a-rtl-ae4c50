// One stage of the linear array: N_PE processing elements in a row, as
// configured into one FPGA of the array.
//
// PE k of the stage has phase (FIRST_PHASE + k) mod 2, so phases keep
// alternating across stage boundaries when FIRST_PHASE is the parity of the
// stage's first PE in the whole array. Source characters and distances enter
// on the left and leave on the right; target characters and distances enter
// on the right and leave on the left. The default of 24 PEs is the count of
// an inner stage of the long DNA array.
module pe_chain
  import nac_pkg::*;
#(
  parameter char_mode_e MODE        = MODE_DNA,
  parameter int         CHAR_W      = char_width(MODE),
  parameter int         N_PE        = 24,
  parameter bit         FIRST_PHASE = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CHAR_W-1:0] src_chr_i,   // left end
  input  dist_t             src_dst_i,
  output logic [CHAR_W-1:0] src_chr_o,   // right end
  output dist_t             src_dst_o,
  input  logic [CHAR_W-1:0] tgt_chr_i,   // right end
  input  dist_t             tgt_dst_i,
  output logic [CHAR_W-1:0] tgt_chr_o,   // left end
  output dist_t             tgt_dst_o
);

  // Link k sits to the left of PE k; link N_PE is the right end.
  logic [CHAR_W-1:0] src_chr [N_PE+1];
  dist_t             src_dst [N_PE+1];
  logic [CHAR_W-1:0] tgt_chr [N_PE+1];
  dist_t             tgt_dst [N_PE+1];

  assign src_chr[0]    = src_chr_i;
  assign src_dst[0]    = src_dst_i;
  assign tgt_chr[N_PE] = tgt_chr_i;
  assign tgt_dst[N_PE] = tgt_dst_i;

  for (genvar k = 0; k < N_PE; k++) begin : g_pe
    nac_pe #(
      .MODE  (MODE),
      .CHAR_W(CHAR_W),
      .PHASE (1'((int'(FIRST_PHASE) + k) % 2))
    ) u_pe (
      .clk, .rst_n,
      .src_chr_i(src_chr[k]),   .src_dst_i(src_dst[k]),
      .tgt_chr_i(tgt_chr[k+1]), .tgt_dst_i(tgt_dst[k+1]),
      .src_chr_o(src_chr[k+1]), .src_dst_o(src_dst[k+1]),
      .tgt_chr_o(tgt_chr[k]),   .tgt_dst_o(tgt_dst[k])
    );
  end

  assign src_chr_o = src_chr[N_PE];
  assign src_dst_o = src_dst[N_PE];
  assign tgt_chr_o = tgt_chr[0];
  assign tgt_dst_o = tgt_dst[0];

endmodule
