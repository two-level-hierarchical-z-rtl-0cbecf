// On-chip HZ-buffer memory: one EW-bit entry per level-2 block.
//
// The buffer stays on chip so the two visibility tests see a short, fixed
// latency. It has three synchronous read ports (triangle test, pixel test,
// update read-modify-write) and one write port; each read returns the
// entry addressed in the previous cycle and does not see a write to the
// same address in that cycle (read-before-write; the update unit forwards
// around this). A clear_i pulse starts a sweep that writes INIT_ENTRY to
// every address, one per cycle, ENTRIES cycles in all, with busy_o high
// throughout; update writes are ignored during the sweep. The port count
// and the sweeping clear are this design's choices; the size and entry
// formats follow the design's buffer-size formula (80 x 64 entries of 20
// bits at the default configuration).
module hz_buffer #(
  parameter int unsigned ENTRIES = (hz_pkg::DEF_WIDTH >> (hz_pkg::DEF_L1_SHIFT + 1)) *
                                   (hz_pkg::DEF_HEIGHT >> (hz_pkg::DEF_L1_SHIFT + 1)),
  parameter int unsigned EW      = hz_pkg::entry_width(hz_pkg::DEF_COMPRESS, hz_pkg::DEF_DW),
  parameter logic [EW-1:0] INIT_ENTRY = {EW{1'b1}},
  localparam int unsigned AW     = $clog2(ENTRIES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear_i,
  output logic          busy_o,
  // read port 0 (triangle test)
  input  logic          rd0_en_i,
  input  logic [AW-1:0] rd0_addr_i,
  output logic [EW-1:0] rd0_data_o,
  // read port 1 (pixel test)
  input  logic          rd1_en_i,
  input  logic [AW-1:0] rd1_addr_i,
  output logic [EW-1:0] rd1_data_o,
  // read port 2 (update read-modify-write)
  input  logic          rd2_en_i,
  input  logic [AW-1:0] rd2_addr_i,
  output logic [EW-1:0] rd2_data_o,
  // write port
  input  logic          wr_en_i,
  input  logic [AW-1:0] wr_addr_i,
  input  logic [EW-1:0] wr_data_i
);
  logic [EW-1:0] mem [ENTRIES];
  logic          clr_active;
  logic [AW-1:0] clr_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clr_active <= 1'b0;
      clr_addr   <= '0;
    end else if (clear_i && !clr_active) begin
      clr_active <= 1'b1;
      clr_addr   <= '0;
    end else if (clr_active) begin
      if (clr_addr == AW'(ENTRIES - 1)) clr_active <= 1'b0;
      clr_addr <= clr_addr + 1'b1;
    end
  end

  assign busy_o = clr_active;

  always_ff @(posedge clk) begin
    if (clr_active)  mem[clr_addr]  <= INIT_ENTRY;
    else if (wr_en_i) mem[wr_addr_i] <= wr_data_i;
    if (rd0_en_i) rd0_data_o <= mem[rd0_addr_i];
    if (rd1_en_i) rd1_data_o <= mem[rd1_addr_i];
    if (rd2_en_i) rd2_data_o <= mem[rd2_addr_i];
  end
endmodule
