// Two-level hierarchical Z-buffer visibility unit (top level).
//
// Inserts two early visibility tests into a triangle rendering pipeline:
//   * the triangle HZ test (tri_*), between back-face culling and lighting,
//     discards triangles that lie wholly behind the level-2 or level-1
//     block that contains them, before lighting, setup and rasterization;
//   * the pixel HZ test (pix_*), between rasterization and texturing,
//     discards pixels behind their level-1 block before any texture or
//     Z-buffer access.
// Both read a small on-chip HZ buffer. The HZ management unit keeps that
// buffer current from the pixels that passed the Z-buffer test (zp_*),
// through the bit-mask cache, so the external Z buffer is never read for
// HZ maintenance.
//
// Interface: tri_* and pix_* inputs are accepted when valid and ready;
// ready is low while a clear sweep runs (clear_i, busy_o). Each test
// answers two cycles after accepting an item, with a pass flag; discarded
// items are to be dropped by the consumer. The triangle test takes one
// triangle per cycle; the pixel test takes a group of PIX_LANES pixels per
// cycle (one by default), tested together when they share a level-2 block.
// With PIX_LANES = 1 the pix_* ports are plain vectors. The
// zp_* port takes one Z-test-passed pixel per cycle and has no ready; the
// Z-buffer test, the external buffers and the other pipeline stages are
// outside this unit. The status pulses report the unit's mechanisms.
// Defaults: 1280 x 1024, 16x16 / 8x8 blocks, 8-bit HZ depth, 64-block
// bit-mask cache, compressed entries (COMPRESS = 1; 0 selects the
// uncompressed 34-bit format). ZW = 16 is this design's choice.
module hz_top #(
  parameter int unsigned WIDTH        = hz_pkg::DEF_WIDTH,
  parameter int unsigned HEIGHT       = hz_pkg::DEF_HEIGHT,
  parameter int unsigned L1_SHIFT     = hz_pkg::DEF_L1_SHIFT,
  parameter int unsigned DW           = hz_pkg::DEF_DW,
  parameter int unsigned ZW           = hz_pkg::DEF_ZW,
  parameter int unsigned CACHE_BLOCKS = hz_pkg::DEF_CACHE_BLOCKS,
  parameter bit          COMPRESS     = hz_pkg::DEF_COMPRESS,
  parameter int unsigned IDW          = 16,
  parameter int unsigned PIX_LANES    = 1,
  localparam int unsigned XW = $clog2(WIDTH),
  localparam int unsigned YW = $clog2(HEIGHT)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear_i,
  output logic           busy_o,
  // triangle HZ test
  input  logic           tri_valid_i,
  output logic           tri_ready_o,
  input  logic [XW-1:0]  tri_vx_i [3],
  input  logic [YW-1:0]  tri_vy_i [3],
  input  logic [ZW-1:0]  tri_vz_i [3],
  input  logic [IDW-1:0] tri_id_i,
  output logic           tri_out_valid_o,
  output logic           tri_out_pass_o,
  output logic [IDW-1:0] tri_out_id_o,
  output logic           tri_rej_l2_o,
  output logic           tri_rej_l1_o,
  output logic           tri_straddle_o,
  // pixel HZ test
  input  logic [PIX_LANES-1:0]         pix_valid_i,
  output logic                         pix_ready_o,
  input  logic [PIX_LANES-1:0][XW-1:0] pix_x_i,
  input  logic [PIX_LANES-1:0][YW-1:0] pix_y_i,
  input  logic [PIX_LANES-1:0][ZW-1:0] pix_z_i,
  output logic [PIX_LANES-1:0]         pix_out_valid_o,
  output logic [PIX_LANES-1:0]         pix_out_pass_o,
  output logic [PIX_LANES-1:0][XW-1:0] pix_out_x_o,
  output logic [PIX_LANES-1:0][YW-1:0] pix_out_y_o,
  output logic [PIX_LANES-1:0][ZW-1:0] pix_out_z_o,
  // pixels that passed the Z-buffer test
  input  logic           zp_valid_i,
  input  logic [XW-1:0]  zp_x_i,
  input  logic [YW-1:0]  zp_y_i,
  input  logic [ZW-1:0]  zp_z_i,
  // status pulses
  output logic           cache_hit_o,
  output logic           cache_miss_o,
  output logic           cache_evict_o,
  output logic           hz_write_o,
  output logic           bypass_o,
  output logic [1:0]     enc_case_o
);
  localparam int unsigned AW = $clog2((WIDTH >> (L1_SHIFT + 1)) * (HEIGHT >> (L1_SHIFT + 1)));
  localparam int unsigned EW = hz_pkg::entry_width(COMPRESS, DW);

  logic          busy;
  logic          rd0_en, rd1_en;
  logic [AW-1:0] rd0_addr, rd1_addr;
  logic [EW-1:0] rd0_data, rd1_data;

  assign busy_o      = busy;
  assign tri_ready_o = !busy;
  assign pix_ready_o = !busy;

  hz_tri_test #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .L1_SHIFT(L1_SHIFT), .DW(DW), .ZW(ZW),
                .COMPRESS(COMPRESS), .IDW(IDW)) u_tri (
    .clk, .rst_n,
    .tri_valid_i(tri_valid_i && !busy), .vx_i(tri_vx_i), .vy_i(tri_vy_i), .vz_i(tri_vz_i),
    .tri_id_i,
    .rd_en_o(rd0_en), .rd_addr_o(rd0_addr), .rd_data_i(rd0_data),
    .out_valid_o(tri_out_valid_o), .out_pass_o(tri_out_pass_o), .out_id_o(tri_out_id_o),
    .out_rej_l2_o(tri_rej_l2_o), .out_rej_l1_o(tri_rej_l1_o), .out_straddle_o(tri_straddle_o));

  hz_pixel_test #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .L1_SHIFT(L1_SHIFT), .DW(DW), .ZW(ZW),
                  .COMPRESS(COMPRESS), .LANES(PIX_LANES)) u_pix (
    .clk, .rst_n,
    .pix_valid_i(pix_valid_i & {PIX_LANES{!busy}}), .pix_x_i, .pix_y_i, .pix_z_i,
    .rd_en_o(rd1_en), .rd_addr_o(rd1_addr), .rd_data_i(rd1_data),
    .out_valid_o(pix_out_valid_o), .out_pass_o(pix_out_pass_o),
    .out_x_o(pix_out_x_o), .out_y_o(pix_out_y_o), .out_z_o(pix_out_z_o));

  hz_management #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .L1_SHIFT(L1_SHIFT), .DW(DW), .ZW(ZW),
                  .CACHE_BLOCKS(CACHE_BLOCKS), .COMPRESS(COMPRESS)) u_mgmt (
    .clk, .rst_n, .clear_i, .busy_o(busy),
    .rd0_en_i(rd0_en), .rd0_addr_i(rd0_addr), .rd0_data_o(rd0_data),
    .rd1_en_i(rd1_en), .rd1_addr_i(rd1_addr), .rd1_data_o(rd1_data),
    .zp_valid_i, .zp_x_i, .zp_y_i, .zp_z_i,
    .cache_hit_o, .cache_miss_o, .cache_evict_o, .hz_write_o, .bypass_o, .enc_case_o);
endmodule
