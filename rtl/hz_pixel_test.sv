// Pixel-level HZ visibility test.
//
// Sits after rasterization. Each pixel's depth, reduced to DW bits by
// keeping the top bits, is compared with the level-1 (8x8) block depth that
// covers the pixel; a pixel strictly farther than it is behind every pixel
// of the block and is discarded before texturing and the Z-buffer access.
// Pixels outside the screen pass.
//
// Throughput: LANES pixels per cycle. The pixel test is meant to be
// widened to several pixels at once; the lane count is left open, so the
// default is one lane. One HZ-buffer entry holds a whole level-2 block, so
// a single read serves every lane whose pixel lies in the same level-2
// block as lane 0, the group's reference pixel. Each lane picks its own
// level-1 depth from the decoded entry. A lane whose pixel lies in another
// level-2 block, or off the screen, passes untested. The address is taken
// from lane 0 whether or not lane 0 is valid, so a rasterizer should issue
// the pixels of one block together. Grouping by lane 0 and passing the
// other lanes untested are this design's own choices.
//
// Interface: pix_valid_i has one bit per lane; pix_x_i, pix_y_i, pix_z_i
// are packed arrays with one element per lane (plain vectors when
// LANES = 1). No back-pressure.
//
// Timing: the HZ-buffer read is issued in the input cycle and the result is
// registered, so out_valid_o follows pix_valid_i by two cycles, with each
// lane's x, y and full depth carried along.
module hz_pixel_test #(
  parameter int unsigned WIDTH    = hz_pkg::DEF_WIDTH,
  parameter int unsigned HEIGHT   = hz_pkg::DEF_HEIGHT,
  parameter int unsigned L1_SHIFT = hz_pkg::DEF_L1_SHIFT,
  parameter int unsigned DW       = hz_pkg::DEF_DW,
  parameter int unsigned ZW       = hz_pkg::DEF_ZW,
  parameter bit          COMPRESS = hz_pkg::DEF_COMPRESS,
  parameter int unsigned LANES    = 1,
  localparam int unsigned XW      = $clog2(WIDTH),
  localparam int unsigned YW      = $clog2(HEIGHT),
  localparam int unsigned L2_COLS = WIDTH >> (L1_SHIFT + 1),
  localparam int unsigned AW      = $clog2(L2_COLS * (HEIGHT >> (L1_SHIFT + 1))),
  localparam int unsigned EW      = hz_pkg::entry_width(COMPRESS, DW)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [LANES-1:0]          pix_valid_i,
  input  logic [LANES-1:0][XW-1:0]  pix_x_i,
  input  logic [LANES-1:0][YW-1:0]  pix_y_i,
  input  logic [LANES-1:0][ZW-1:0]  pix_z_i,
  output logic                      rd_en_o,
  output logic [AW-1:0]             rd_addr_o,
  input  logic [EW-1:0]             rd_data_i,
  output logic [LANES-1:0]          out_valid_o,
  output logic [LANES-1:0]          out_pass_o,
  output logic [LANES-1:0][XW-1:0]  out_x_o,
  output logic [LANES-1:0][YW-1:0]  out_y_o,
  output logic [LANES-1:0][ZW-1:0]  out_z_o
);
  localparam int unsigned S2 = L1_SHIFT + 1;

  // a lane is tested when its pixel is on the screen and in lane 0's
  // level-2 block (lane 0 always is, when on the screen)
  logic [LANES-1:0] test;
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      test[l] = (32'(pix_x_i[l]) < WIDTH) && (32'(pix_y_i[l]) < HEIGHT) &&
                (pix_x_i[l][XW-1:S2] == pix_x_i[0][XW-1:S2]) &&
                (pix_y_i[l][YW-1:S2] == pix_y_i[0][YW-1:S2]);
    end
  end
  assign rd_en_o   = |(pix_valid_i & test);
  assign rd_addr_o = AW'((32'(pix_y_i[0]) >> S2) * L2_COLS + (32'(pix_x_i[0]) >> S2));

  logic [LANES-1:0]          s1_valid, s1_test;
  logic [LANES-1:0][1:0]     s1_k;
  logic [LANES-1:0][XW-1:0]  s1_x;
  logic [LANES-1:0][YW-1:0]  s1_y;
  logic [LANES-1:0][ZW-1:0]  s1_z;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= '0;
      s1_test  <= '0;
      s1_k     <= '0;
      s1_x     <= '0;
      s1_y     <= '0;
      s1_z     <= '0;
    end else begin
      s1_valid <= pix_valid_i;
      s1_test  <= test;
      for (int l = 0; l < LANES; l++)
        s1_k[l] <= {pix_y_i[l][L1_SHIFT], pix_x_i[l][L1_SHIFT]};
      s1_x     <= pix_x_i;
      s1_y     <= pix_y_i;
      s1_z     <= pix_z_i;
    end
  end

  logic [DW-1:0] l1_z [4];
  logic [DW-1:0] l2_unused;
  logic [EW-1:0] entry_unused;

  if (COMPRESS) begin : g_bilevel
    logic [1:0] case_unused;
    hz_bilevel_codec #(.DW(DW)) u_dec (
      .entry_i(rd_data_i), .upd_blk_i(2'd0), .upd_z_i('0),
      .l1_z_o(l1_z), .l2_z_o(l2_unused), .entry_o(entry_unused), .case_o(case_unused));
  end else begin : g_raw
    hz_raw_codec #(.DW(DW)) u_dec (
      .entry_i(rd_data_i), .upd_blk_i(2'd0), .upd_z_i('0),
      .l1_z_o(l1_z), .l2_z_o(l2_unused), .entry_o(entry_unused));
  end

  logic [LANES-1:0] pass;
  always_comb begin
    for (int l = 0; l < LANES; l++)
      pass[l] = !s1_test[l] || !(s1_z[l][ZW-1 -: DW] > l1_z[s1_k[l]]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid_o <= '0;
      out_pass_o  <= '0;
      out_x_o     <= '0;
      out_y_o     <= '0;
      out_z_o     <= '0;
    end else begin
      out_valid_o <= s1_valid;
      out_pass_o  <= pass;
      out_x_o     <= s1_x;
      out_y_o     <= s1_y;
      out_z_o     <= s1_z;
    end
  end
endmodule
