// HZ-buffer update unit.
//
// Takes the update requests of the bit-mask cache (a fully covered level-1
// block and its new farthest depth newZ) and folds each into the HZ-buffer
// entry of the enclosing level-2 block by read-modify-write through the
// entry codec: the uncompressed codec when COMPRESS = 0, the dynamic
// bi-level codec when COMPRESS = 1.
//
// Two-stage pipeline, one request per cycle:
//   cycle 1 (request): compute the level-2 address (row * L2_COLS + column)
//            and the sub-block k = {by[0], bx[0]}, issue the read;
//   cycle 2: apply the codec update; the write is issued in this cycle and
//            lands at its closing clock edge.
// The buffer read does not see a write in the same cycle, so a request that
// reads the entry being written by the request just ahead of it takes the
// written value instead (bypass_o pulses). The pipeline and the forwarding
// are this implementation's; the update itself follows the design.
module hz_update_unit #(
  parameter int unsigned WIDTH    = hz_pkg::DEF_WIDTH,
  parameter int unsigned HEIGHT   = hz_pkg::DEF_HEIGHT,
  parameter int unsigned L1_SHIFT = hz_pkg::DEF_L1_SHIFT,
  parameter int unsigned DW       = hz_pkg::DEF_DW,
  parameter bit          COMPRESS = hz_pkg::DEF_COMPRESS,
  localparam int unsigned L2_COLS = WIDTH >> (L1_SHIFT + 1),
  localparam int unsigned L2_ROWS = HEIGHT >> (L1_SHIFT + 1),
  localparam int unsigned ENTRIES = L2_COLS * L2_ROWS,
  localparam int unsigned AW      = $clog2(ENTRIES),
  localparam int unsigned BXW     = $clog2(WIDTH >> L1_SHIFT),
  localparam int unsigned BYW     = $clog2(HEIGHT >> L1_SHIFT),
  localparam int unsigned EW      = hz_pkg::entry_width(COMPRESS, DW)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           flush_i,
  input  logic           upd_valid_i,
  input  logic [BXW-1:0] upd_bx_i,
  input  logic [BYW-1:0] upd_by_i,
  input  logic [DW-1:0]  upd_z_i,
  output logic           rd_en_o,
  output logic [AW-1:0]  rd_addr_o,
  input  logic [EW-1:0]  rd_data_i,
  output logic           wr_en_o,
  output logic [AW-1:0]  wr_addr_o,
  output logic [EW-1:0]  wr_data_o,
  output logic           bypass_o,
  output logic [1:0]     enc_case_o   // bi-level encoder branch of this write
);
  logic          s1_valid, s1_fwd;
  logic [AW-1:0] s1_addr;
  logic [1:0]    s1_blk;
  logic [DW-1:0] s1_z;
  logic [EW-1:0] s1_fwd_data, base;
  logic [AW-1:0] addr;

  assign addr      = AW'((32'(upd_by_i) >> 1) * L2_COLS + (32'(upd_bx_i) >> 1));
  assign rd_en_o   = upd_valid_i;
  assign rd_addr_o = addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid    <= 1'b0;
      s1_fwd      <= 1'b0;
      s1_addr     <= '0;
      s1_blk      <= '0;
      s1_z        <= '0;
      s1_fwd_data <= '0;
    end else begin
      s1_valid    <= upd_valid_i && !flush_i;
      s1_fwd      <= wr_en_o && (wr_addr_o == addr);
      s1_addr     <= addr;
      s1_blk      <= {upd_by_i[0], upd_bx_i[0]};
      s1_z        <= upd_z_i;
      s1_fwd_data <= wr_data_o;
    end
  end

  assign base      = s1_fwd ? s1_fwd_data : rd_data_i;
  assign wr_en_o   = s1_valid;
  assign wr_addr_o = s1_addr;
  assign bypass_o  = s1_valid && s1_fwd;

  logic [DW-1:0] l1_unused [4];
  logic [DW-1:0] l2_unused;

  if (COMPRESS) begin : g_bilevel
    hz_bilevel_codec #(.DW(DW)) u_codec (
      .entry_i(base), .upd_blk_i(s1_blk), .upd_z_i(s1_z),
      .l1_z_o(l1_unused), .l2_z_o(l2_unused), .entry_o(wr_data_o), .case_o(enc_case_o));
  end else begin : g_raw
    hz_raw_codec #(.DW(DW)) u_codec (
      .entry_i(base), .upd_blk_i(s1_blk), .upd_z_i(s1_z),
      .l1_z_o(l1_unused), .l2_z_o(l2_unused), .entry_o(wr_data_o));
    assign enc_case_o = 2'd0;
  end
endmodule
