// Triangle-level HZ visibility test.
//
// Sits after transform and back-face culling. For each screen-space
// triangle it takes the bounding box of the three vertices. If the box lies
// inside one level-2 (16x16) block, the nearest vertex depth is compared
// with that block's level-2 depth; a triangle lying wholly behind it is
// discarded. A triangle that survives and also lies inside one level-1
// (8x8) block is compared with that block's level-1 depth the same way.
// Triangles that straddle blocks, or reach beyond the screen, pass
// unchanged and are left to the pixel-level test. One HZ-buffer read serves
// both levels, because an entry holds a level-2 block with its four
// level-1 blocks.
//
// The design's own wording tests the "farthest vertex"; this implementation
// compares the nearest vertex, the comparison that never discards a
// triangle with a visible part. Depths are reduced to DW bits by keeping the
// top bits, and a triangle is discarded only when that value is strictly
// farther than the stored one.
//
// Timing: one triangle per cycle; the read is issued in the input cycle
// and the result is registered, so out_valid_o follows tri_valid_i by two
// cycles. tri_id_i is carried through for the consumer.
module hz_tri_test #(
  parameter int unsigned WIDTH    = hz_pkg::DEF_WIDTH,
  parameter int unsigned HEIGHT   = hz_pkg::DEF_HEIGHT,
  parameter int unsigned L1_SHIFT = hz_pkg::DEF_L1_SHIFT,
  parameter int unsigned DW       = hz_pkg::DEF_DW,
  parameter int unsigned ZW       = hz_pkg::DEF_ZW,
  parameter bit          COMPRESS = hz_pkg::DEF_COMPRESS,
  parameter int unsigned IDW      = 16,
  localparam int unsigned XW      = $clog2(WIDTH),
  localparam int unsigned YW      = $clog2(HEIGHT),
  localparam int unsigned L2_COLS = WIDTH >> (L1_SHIFT + 1),
  localparam int unsigned AW      = $clog2(L2_COLS * (HEIGHT >> (L1_SHIFT + 1))),
  localparam int unsigned EW      = hz_pkg::entry_width(COMPRESS, DW)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           tri_valid_i,
  input  logic [XW-1:0]  vx_i [3],
  input  logic [YW-1:0]  vy_i [3],
  input  logic [ZW-1:0]  vz_i [3],
  input  logic [IDW-1:0] tri_id_i,
  output logic           rd_en_o,
  output logic [AW-1:0]  rd_addr_o,
  input  logic [EW-1:0]  rd_data_i,
  output logic           out_valid_o,
  output logic           out_pass_o,
  output logic [IDW-1:0] out_id_o,
  output logic           out_rej_l2_o,   // discarded by the level-2 test
  output logic           out_rej_l1_o,   // discarded by the level-1 test
  output logic           out_straddle_o  // not inside one level-2 block
);
  localparam int unsigned S2 = L1_SHIFT + 1;

  logic [XW-1:0] xmin, xmax;
  logic [YW-1:0] ymin, ymax;
  logic [ZW-1:0] zmin;
  logic          in_l2, in_l1;

  always_comb begin
    xmin = vx_i[0]; xmax = vx_i[0];
    ymin = vy_i[0]; ymax = vy_i[0];
    zmin = vz_i[0];
    for (int i = 1; i < 3; i++) begin
      if (vx_i[i] < xmin) xmin = vx_i[i];
      if (vx_i[i] > xmax) xmax = vx_i[i];
      if (vy_i[i] < ymin) ymin = vy_i[i];
      if (vy_i[i] > ymax) ymax = vy_i[i];
      if (vz_i[i] < zmin) zmin = vz_i[i];
    end
    in_l2 = (32'(xmax) < WIDTH) && (32'(ymax) < HEIGHT) &&
            ((xmin >> S2) == (xmax >> S2)) && ((ymin >> S2) == (ymax >> S2));
    in_l1 = in_l2 && ((xmin >> L1_SHIFT) == (xmax >> L1_SHIFT)) &&
            ((ymin >> L1_SHIFT) == (ymax >> L1_SHIFT));
  end

  assign rd_en_o   = tri_valid_i && in_l2;
  assign rd_addr_o = AW'((32'(ymin) >> S2) * L2_COLS + (32'(xmin) >> S2));

  logic           s1_valid, s1_l2, s1_l1;
  logic [1:0]     s1_k;
  logic [DW-1:0]  s1_zq;
  logic [IDW-1:0] s1_id;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_l2    <= 1'b0;
      s1_l1    <= 1'b0;
      s1_k     <= '0;
      s1_zq    <= '0;
      s1_id    <= '0;
    end else begin
      s1_valid <= tri_valid_i;
      s1_l2    <= in_l2;
      s1_l1    <= in_l1;
      s1_k     <= {ymin[L1_SHIFT], xmin[L1_SHIFT]};
      s1_zq    <= zmin[ZW-1 -: DW];
      s1_id    <= tri_id_i;
    end
  end

  logic [DW-1:0] l1_z [4];
  logic [DW-1:0] l2_z;
  logic [EW-1:0] entry_unused;

  if (COMPRESS) begin : g_bilevel
    logic [1:0] case_unused;
    hz_bilevel_codec #(.DW(DW)) u_dec (
      .entry_i(rd_data_i), .upd_blk_i(2'd0), .upd_z_i('0),
      .l1_z_o(l1_z), .l2_z_o(l2_z), .entry_o(entry_unused), .case_o(case_unused));
  end else begin : g_raw
    hz_raw_codec #(.DW(DW)) u_dec (
      .entry_i(rd_data_i), .upd_blk_i(2'd0), .upd_z_i('0),
      .l1_z_o(l1_z), .l2_z_o(l2_z), .entry_o(entry_unused));
  end

  logic rej2, rej1;
  assign rej2 = s1_l2 && (s1_zq > l2_z);
  assign rej1 = !rej2 && s1_l1 && (s1_zq > l1_z[s1_k]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid_o    <= 1'b0;
      out_pass_o     <= 1'b0;
      out_id_o       <= '0;
      out_rej_l2_o   <= 1'b0;
      out_rej_l1_o   <= 1'b0;
      out_straddle_o <= 1'b0;
    end else begin
      out_valid_o    <= s1_valid;
      out_pass_o     <= !(rej2 || rej1);
      out_id_o       <= s1_id;
      out_rej_l2_o   <= s1_valid && rej2;
      out_rej_l1_o   <= s1_valid && rej1;
      out_straddle_o <= s1_valid && !s1_l2;
    end
  end
endmodule
