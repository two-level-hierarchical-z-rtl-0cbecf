// Uncompressed HZ-buffer entry codec (one level-2 block).
//
// Entry layout, MSB first: {index[1:0], L1_0, L1_1, L1_2, L1_3}, each L1_k a
// DW-bit depth, the farthest depth found in level-1 block k. The 2-bit index
// names the level-1 block holding the farthest of the four, so the level-2
// depth needs no storage of its own. Field order and index follow the
// format figure of the design; the binary coding of the index (block k ->
// value k) and the lowest-k choice on ties are this design's choice.
//
// Purely combinational:
//   decode : entry_i -> l1_z_o[0..3], l2_z_o (= L1 at index)
//   update : entry_i with level-1 block upd_blk_i set to upd_z_i -> entry_o,
//            index recomputed as the farthest of the new four depths.
module hz_raw_codec #(
  parameter int unsigned DW = hz_pkg::DEF_DW,
  localparam int unsigned EW = 4 * DW + 2
) (
  input  logic [EW-1:0] entry_i,
  input  logic [1:0]    upd_blk_i,
  input  logic [DW-1:0] upd_z_i,
  output logic [DW-1:0] l1_z_o [4],
  output logic [DW-1:0] l2_z_o,
  output logic [EW-1:0] entry_o
);
  logic [1:0]    idx;
  logic [DW-1:0] nz [4];
  logic [1:0]    nidx;

  always_comb begin
    idx = entry_i[EW-1 -: 2];
    for (int k = 0; k < 4; k++) l1_z_o[k] = entry_i[(3-k)*DW +: DW];
    l2_z_o = l1_z_o[idx];

    for (int k = 0; k < 4; k++) nz[k] = (upd_blk_i == 2'(k)) ? upd_z_i : l1_z_o[k];
    nidx = 2'd0;
    for (int k = 1; k < 4; k++) if (nz[k] > nz[nidx]) nidx = 2'(k);
    entry_o = {nidx, nz[0], nz[1], nz[2], nz[3]};
  end
endmodule
