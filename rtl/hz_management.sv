// HZ management unit: on-chip HZ buffer, bit-mask cache and update unit.
//
// Serves the HZ-buffer reads of the triangle test (port 0) and the pixel
// test (port 1), and keeps the buffer current without reading the external
// Z buffer: every pixel that passed the HZ test and the Z-buffer test enters
// the bit-mask cache (zp_*), and when the cache finds a level-1 block fully
// covered it hands the block's farthest depth (tmpZ) to the update unit,
// which rewrites the level-2 entry through the entry codec.
//
// zp_z_i is the full pipeline depth; it is reduced to the DW-bit HZ
// accuracy by keeping its top bits. clear_i (one pulse, e.g. at the start of
// a frame together with the Z-buffer clear) resets every entry to the far
// plane by an ENTRIES-cycle sweep (busy_o high), invalidates the cache and
// drops any update in flight. Update latency: when the zp_* pixel of cycle 0
// completes a block, the cache reports it in cycle 1, the update unit
// writes the entry at the end of cycle 2, and a test read issued in cycle 3
// sees the new depth.
module hz_management #(
  parameter int unsigned WIDTH        = hz_pkg::DEF_WIDTH,
  parameter int unsigned HEIGHT       = hz_pkg::DEF_HEIGHT,
  parameter int unsigned L1_SHIFT     = hz_pkg::DEF_L1_SHIFT,
  parameter int unsigned DW           = hz_pkg::DEF_DW,
  parameter int unsigned ZW           = hz_pkg::DEF_ZW,
  parameter int unsigned CACHE_BLOCKS = hz_pkg::DEF_CACHE_BLOCKS,
  parameter bit          COMPRESS     = hz_pkg::DEF_COMPRESS,
  localparam int unsigned XW      = $clog2(WIDTH),
  localparam int unsigned YW      = $clog2(HEIGHT),
  localparam int unsigned ENTRIES = (WIDTH >> (L1_SHIFT + 1)) * (HEIGHT >> (L1_SHIFT + 1)),
  localparam int unsigned AW      = $clog2(ENTRIES),
  localparam int unsigned BXW     = $clog2(WIDTH >> L1_SHIFT),
  localparam int unsigned BYW     = $clog2(HEIGHT >> L1_SHIFT),
  localparam int unsigned EW      = hz_pkg::entry_width(COMPRESS, DW)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear_i,
  output logic          busy_o,
  input  logic          rd0_en_i,
  input  logic [AW-1:0] rd0_addr_i,
  output logic [EW-1:0] rd0_data_o,
  input  logic          rd1_en_i,
  input  logic [AW-1:0] rd1_addr_i,
  output logic [EW-1:0] rd1_data_o,
  input  logic          zp_valid_i,
  input  logic [XW-1:0] zp_x_i,
  input  logic [YW-1:0] zp_y_i,
  input  logic [ZW-1:0] zp_z_i,
  output logic          cache_hit_o,
  output logic          cache_miss_o,
  output logic          cache_evict_o,
  output logic          hz_write_o,      // an HZ-buffer entry was rewritten
  output logic          bypass_o,
  output logic [1:0]    enc_case_o
);
  logic           upd_valid;
  logic [BXW-1:0] upd_bx;
  logic [BYW-1:0] upd_by;
  logic [DW-1:0]  upd_z;
  logic           rd2_en, wr_en;
  logic [AW-1:0]  rd2_addr, wr_addr;
  logic [EW-1:0]  rd2_data, wr_data;
  logic           busy;

  hz_buffer #(.ENTRIES(ENTRIES), .EW(EW), .INIT_ENTRY({EW{1'b1}})) u_buf (
    .clk, .rst_n, .clear_i, .busy_o(busy),
    .rd0_en_i, .rd0_addr_i, .rd0_data_o,
    .rd1_en_i, .rd1_addr_i, .rd1_data_o,
    .rd2_en_i(rd2_en), .rd2_addr_i(rd2_addr), .rd2_data_o(rd2_data),
    .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_data_i(wr_data));

  bitmask_cache #(.CACHE_BLOCKS(CACHE_BLOCKS), .L1_SHIFT(L1_SHIFT), .DW(DW),
                  .BXW(BXW), .BYW(BYW)) u_cache (
    .clk, .rst_n, .clear_i,
    .pix_valid_i(zp_valid_i && !busy),
    .pix_bx_i(BXW'(zp_x_i >> L1_SHIFT)),
    .pix_by_i(BYW'(zp_y_i >> L1_SHIFT)),
    .pix_sub_i({zp_y_i[L1_SHIFT-1:0], zp_x_i[L1_SHIFT-1:0]}),
    .pix_z_i(zp_z_i[ZW-1 -: DW]),
    .upd_valid_o(upd_valid), .upd_bx_o(upd_bx), .upd_by_o(upd_by), .upd_z_o(upd_z),
    .hit_o(cache_hit_o), .miss_o(cache_miss_o), .evict_o(cache_evict_o));

  hz_update_unit #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .L1_SHIFT(L1_SHIFT), .DW(DW),
                   .COMPRESS(COMPRESS)) u_upd (
    .clk, .rst_n, .flush_i(clear_i || busy),
    .upd_valid_i(upd_valid), .upd_bx_i(upd_bx), .upd_by_i(upd_by), .upd_z_i(upd_z),
    .rd_en_o(rd2_en), .rd_addr_o(rd2_addr), .rd_data_i(rd2_data),
    .wr_en_o(wr_en), .wr_addr_o(wr_addr), .wr_data_o(wr_data),
    .bypass_o, .enc_case_o);

  assign busy_o     = busy;
  assign hz_write_o = wr_en && !busy;
endmodule
