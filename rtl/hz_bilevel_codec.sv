// Dynamic bi-level compressed HZ-buffer entry codec (one level-2 block).
//
// Instead of four level-1 depths the entry keeps two depths and a 4-bit
// group index: layout MSB first {HHZ, LHZ, M0, M1, M2, M3}. Mk = 1 puts
// level-1 block k in the HHZ group, Mk = 0 in the LHZ group. HHZ is never
// nearer than LHZ, so HHZ is the level-2 depth. The reset entry is
// HHZ = LHZ = far plane, index 1111.
//
// Update with a new level-1 depth newZ for block a (the encoding procedure
// of the design):
//   * all blocks in HHZ group: LHZ = newZ, Ma = 0.
//   * otherwise, with dH = |newZ-HHZ| and dL = |newZ-LHZ|:
//       dH < dL : Ma = 1; if no other block is in the HHZ group, HHZ = newZ.
//       else    : Ma = 0; if now all blocks are in the LHZ group the entry
//                 collapses to HHZ = LHZ = max(newZ, LHZ), index 1111;
//                 otherwise LHZ = max(newZ, LHZ).
// Every block's represented depth stays at or beyond its true farthest
// depth, so the HZ tests stay conservative; only the updated block can move
// nearer. Ties (dH == dL) go to the LHZ group, as the strict comparison of
// the procedure implies.
//
// Purely combinational: decode (entry_i -> l1_z_o, l2_z_o) and update
// (entry_i, upd_blk_i, upd_z_i -> entry_o). case_o reports which branch the
// update took: 0 first split, 1 joined HHZ, 2 joined LHZ, 3 collapse.
module hz_bilevel_codec #(
  parameter int unsigned DW = hz_pkg::DEF_DW,
  localparam int unsigned EW = 2 * DW + 4
) (
  input  logic [EW-1:0] entry_i,
  input  logic [1:0]    upd_blk_i,
  input  logic [DW-1:0] upd_z_i,
  output logic [DW-1:0] l1_z_o [4],
  output logic [DW-1:0] l2_z_o,
  output logic [EW-1:0] entry_o,
  output logic [1:0]    case_o
);
  logic [DW-1:0] hhz, lhz, nh, nl, dh, dl, zmax;
  logic [3:0]    m, nm;   // m[3] = M0 ... m[0] = M3 (entry bit order)

  // entry bit of sub-block k within the index field
  function automatic int unsigned mb(logic [1:0] k);
    return 3 - int'(k);
  endfunction

  always_comb begin
    hhz = entry_i[EW-1 -: DW];
    lhz = entry_i[4 +: DW];
    m   = entry_i[3:0];
    for (int k = 0; k < 4; k++) l1_z_o[k] = m[3-k] ? hhz : lhz;
    l2_z_o = hhz;

    dh   = (upd_z_i > hhz) ? upd_z_i - hhz : hhz - upd_z_i;
    dl   = (upd_z_i > lhz) ? upd_z_i - lhz : lhz - upd_z_i;
    zmax = (upd_z_i > lhz) ? upd_z_i : lhz;
    nh = hhz;
    nl = lhz;
    nm = m;
    if (m == 4'b1111) begin
      nl = upd_z_i;
      nm[mb(upd_blk_i)] = 1'b0;
      case_o = 2'd0;
    end else if (dh < dl) begin
      nm[mb(upd_blk_i)] = 1'b1;
      // no other block in the HHZ group
      if ((m & ~(4'b1 << mb(upd_blk_i))) == 4'b0000) nh = upd_z_i;
      case_o = 2'd1;
    end else begin
      nm[mb(upd_blk_i)] = 1'b0;
      if (nm == 4'b0000) begin
        nh = zmax;
        nl = zmax;
        nm = 4'b1111;
        case_o = 2'd3;
      end else begin
        nl = zmax;
        case_o = 2'd2;
      end
    end
    entry_o = {nh, nl, nm};
  end
endmodule
