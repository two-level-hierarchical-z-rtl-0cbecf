// Self-checking test of the HZ-buffer memory: the clear sweep (length and
// contents), one-cycle synchronous reads on all three ports, writes, and
// read-before-write behaviour when a port reads the address being written.
module tb_hz_buffer;
  localparam int ENTRIES = 40;
  localparam int EW = 20;
  localparam int AW = $clog2(ENTRIES);
  logic clk = 0, rst_n = 0, clear = 0, busy;
  logic rd0_en = 0, rd1_en = 0, rd2_en = 0, wr_en = 0;
  logic [AW-1:0] rd0_addr = 0, rd1_addr = 0, rd2_addr = 0, wr_addr = 0;
  logic [EW-1:0] rd0_data, rd1_data, rd2_data, wr_data = 0;
  logic [EW-1:0] model [ENTRIES];
  int checks = 0, failures = 0;

  hz_buffer #(.ENTRIES(ENTRIES), .EW(EW), .INIT_ENTRY(20'hABCDE)) dut (
    .clk, .rst_n, .clear_i(clear), .busy_o(busy),
    .rd0_en_i(rd0_en), .rd0_addr_i(rd0_addr), .rd0_data_o(rd0_data),
    .rd1_en_i(rd1_en), .rd1_addr_i(rd1_addr), .rd1_data_o(rd1_data),
    .rd2_en_i(rd2_en), .rd2_addr_i(rd2_addr), .rd2_data_o(rd2_data),
    .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_data_i(wr_data));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int busy_cycles;
    logic [AW-1:0] a0, a1, a2;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    clear <= 1;
    @(negedge clk);
    clear <= 0;
    busy_cycles = 0;
    while (busy) begin @(negedge clk); busy_cycles++; end
    chk(busy_cycles == ENTRIES, $sformatf("clear sweep took %0d cycles", busy_cycles));
    for (int i = 0; i < ENTRIES; i++) model[i] = 20'hABCDE;
    // read everything back after the clear
    for (int i = 0; i < ENTRIES; i++) begin
      rd0_en <= 1; rd0_addr <= AW'(i);
      @(negedge clk);
      rd0_en <= 0;
      chk(rd0_data == 20'hABCDE, $sformatf("cleared entry %0d = %h", i, rd0_data));
    end
    // random writes and reads on all ports in the same cycle
    for (int n = 0; n < 600; n++) begin
      a0 = AW'($urandom_range(0, ENTRIES - 1));
      a1 = AW'($urandom_range(0, ENTRIES - 1));
      a2 = (n % 4 == 0) ? wr_addr : AW'($urandom_range(0, ENTRIES - 1));
      @(negedge clk);
      rd0_en <= 1; rd0_addr <= a0;
      rd1_en <= 1; rd1_addr <= a1;
      rd2_en <= 1; rd2_addr <= a2;
      wr_en <= 1; wr_addr <= AW'($urandom_range(0, ENTRIES - 1)); wr_data <= EW'($urandom);
      if (n % 4 == 3) wr_addr <= a2;
      @(posedge clk);
      #1;
      chk(rd0_data == model[a0], "port 0 read");
      chk(rd1_data == model[a1], "port 1 read");
      chk(rd2_data == model[a2], "port 2 read (read before write)");
      model[wr_addr] = wr_data;
    end
    wr_en <= 0; rd0_en <= 0; rd1_en <= 0; rd2_en <= 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
