// Bit-mask cache of the HZ management unit.
//
// Holds CACHE_BLOCKS entries, each with a valid bit, a block tag (the
// level-1 block coordinates), a coverage mask of one level-1 block (one bit
// per pixel, 64 bits for 8x8) and tmpZ, the farthest depth of the pixels
// that entered the block since the entry was (re)started. Input is one
// pixel per cycle that passed both the HZ test and the Z-buffer test. The
// tags are searched fully associatively:
//   hit  : set the pixel's mask bit, tmpZ = max(tmpZ, z);
//   miss : replace the entry at the FIFO pointer (its mask and tmpZ are
//          discarded), start it with this pixel, advance the pointer.
// When the mask of the touched entry becomes all ones (a bit-wise AND of
// the mask) the block is fully covered: upd_valid_o pulses one cycle later
// with the block coordinates and tmpZ, and the entry's mask and tmpZ return
// to zero while it keeps its tag. Pixel depths arrive already reduced to the
// DW-bit HZ accuracy. clear_i invalidates every entry.
//
// The organisation, FIFO replacement, mask and tmpZ rules follow the
// design; the valid bits, the one-pixel-per-cycle single-cycle search and
// the registered update output are this implementation's choices.
// Status pulses (hit_o, miss_o, evict_o = a valid entry was replaced) are
// registered together with upd_valid_o.
module bitmask_cache #(
  parameter int unsigned CACHE_BLOCKS = hz_pkg::DEF_CACHE_BLOCKS,
  parameter int unsigned L1_SHIFT     = hz_pkg::DEF_L1_SHIFT,
  parameter int unsigned DW           = hz_pkg::DEF_DW,
  parameter int unsigned BXW          = 8,   // level-1 block column width
  parameter int unsigned BYW          = 7,   // level-1 block row width
  localparam int unsigned MB          = 1 << (2 * L1_SHIFT),  // mask bits
  localparam int unsigned SW          = 2 * L1_SHIFT,         // pixel-in-block index
  localparam int unsigned PW          = (CACHE_BLOCKS > 1) ? $clog2(CACHE_BLOCKS) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear_i,
  input  logic           pix_valid_i,
  input  logic [BXW-1:0] pix_bx_i,
  input  logic [BYW-1:0] pix_by_i,
  input  logic [SW-1:0]  pix_sub_i,   // {row in block, column in block}
  input  logic [DW-1:0]  pix_z_i,
  output logic           upd_valid_o,
  output logic [BXW-1:0] upd_bx_o,
  output logic [BYW-1:0] upd_by_o,
  output logic [DW-1:0]  upd_z_o,
  output logic           hit_o,
  output logic           miss_o,
  output logic           evict_o
);
  typedef struct packed {
    logic           valid;
    logic [BYW-1:0] by;
    logic [BXW-1:0] bx;
    logic [MB-1:0]  mask;
    logic [DW-1:0]  tmpz;
  } entry_t;

  entry_t        ent [CACHE_BLOCKS];
  logic [PW-1:0] fifo_ptr;

  logic          hit;
  logic [PW-1:0] hit_idx, sel;
  entry_t        cur, nxt;
  logic          full;

  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = 0; i < CACHE_BLOCKS; i++)
      if (ent[i].valid && ent[i].bx == pix_bx_i && ent[i].by == pix_by_i) begin
        hit     = 1'b1;
        hit_idx = PW'(i);
      end
    sel = hit ? hit_idx : fifo_ptr;
    cur = ent[sel];
    nxt = cur;
    if (!hit) begin
      nxt.valid = 1'b1;
      nxt.bx    = pix_bx_i;
      nxt.by    = pix_by_i;
      nxt.mask  = '0;
      nxt.tmpz  = '0;
    end
    nxt.mask[pix_sub_i] = 1'b1;
    if (pix_z_i > nxt.tmpz) nxt.tmpz = pix_z_i;
    full = &nxt.mask;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < CACHE_BLOCKS; i++) ent[i] <= '0;
      fifo_ptr    <= '0;
      upd_valid_o <= 1'b0;
      upd_bx_o    <= '0;
      upd_by_o    <= '0;
      upd_z_o     <= '0;
      hit_o       <= 1'b0;
      miss_o      <= 1'b0;
      evict_o     <= 1'b0;
    end else begin
      upd_valid_o <= 1'b0;
      hit_o       <= 1'b0;
      miss_o      <= 1'b0;
      evict_o     <= 1'b0;
      if (clear_i) begin
        for (int i = 0; i < CACHE_BLOCKS; i++) ent[i].valid <= 1'b0;
        fifo_ptr <= '0;
      end else if (pix_valid_i) begin
        hit_o   <= hit;
        miss_o  <= !hit;
        evict_o <= !hit && cur.valid;
        if (!hit) fifo_ptr <= (fifo_ptr == PW'(CACHE_BLOCKS - 1)) ? '0 : fifo_ptr + 1'b1;
        if (full) begin
          upd_valid_o   <= 1'b1;
          upd_bx_o      <= nxt.bx;
          upd_by_o      <= nxt.by;
          upd_z_o       <= nxt.tmpz;
          ent[sel]      <= nxt;
          ent[sel].mask <= '0;
          ent[sel].tmpz <= '0;
        end else begin
          ent[sel] <= nxt;
        end
      end
    end
  end
endmodule
