// Self-checking test of the HZ update unit working on a real HZ buffer
// (64 x 32 screen, 8 entries, uncompressed entries so every level-1 depth
// is exact). Random update requests, many of them back to back on the same
// entry, are applied; afterwards every entry is read through a spare port
// and compared with the expected level-1 depths and farthest-block index.
// Lost updates between back-to-back requests would show as mismatches. It
// also checks that the write is issued in the cycle after the request and counts bypasses.
module tb_hz_update_unit;
  localparam int W = 64, H = 32, L1S = 3, DW = 8;
  localparam int COLS = W >> (L1S + 1), ENTRIES = COLS * (H >> (L1S + 1));
  localparam int AW = $clog2(ENTRIES), EW = 4 * DW + 2;
  localparam int BXW = $clog2(W >> L1S), BYW = $clog2(H >> L1S);
  logic clk = 0, rst_n = 0, clear = 0, busy;
  logic uv = 0;
  logic [BXW-1:0] ubx = 0;
  logic [BYW-1:0] uby = 0;
  logic [DW-1:0]  uz = 0;
  logic rd_en, wr_en, bypass;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [EW-1:0] rd_data, wr_data, chk_data;
  logic [1:0] enc_case;
  logic chk_en = 0;
  logic [AW-1:0] chk_addr = 0;
  logic [EW-1:0] unused1;
  int checks = 0, failures = 0, n_bypass = 0;
  int blkz [W >> L1S][H >> L1S];

  hz_buffer #(.ENTRIES(ENTRIES), .EW(EW)) u_buf (
    .clk, .rst_n, .clear_i(clear), .busy_o(busy),
    .rd0_en_i(chk_en), .rd0_addr_i(chk_addr), .rd0_data_o(chk_data),
    .rd1_en_i(1'b0), .rd1_addr_i('0), .rd1_data_o(unused1),
    .rd2_en_i(rd_en), .rd2_addr_i(rd_addr), .rd2_data_o(rd_data),
    .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_data_i(wr_data));

  hz_update_unit #(.WIDTH(W), .HEIGHT(H), .L1_SHIFT(L1S), .DW(DW), .COMPRESS(1'b0)) dut (
    .clk, .rst_n, .flush_i(busy), .upd_valid_i(uv), .upd_bx_i(ubx), .upd_by_i(uby),
    .upd_z_i(uz), .rd_en_o(rd_en), .rd_addr_o(rd_addr), .rd_data_i(rd_data),
    .wr_en_o(wr_en), .wr_addr_o(wr_addr), .wr_data_o(wr_data), .bypass_o(bypass),
    .enc_case_o(enc_case));

  always #5 clk = ~clk;
  always @(posedge clk) if (bypass) n_bypass++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bx, by, lat, e_addr;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk); clear <= 1; @(negedge clk); clear <= 0;
    while (busy) @(negedge clk);
    for (int i = 0; i < (W >> L1S); i++) for (int j = 0; j < (H >> L1S); j++) blkz[i][j] = 255;
    // latency of one isolated request
    @(negedge clk);
    uv <= 1; ubx <= 5; uby <= 2; uz <= 77; blkz[5][2] = 77;
    e_addr = (2 >> 1) * COLS + (5 >> 1);
    @(negedge clk); uv <= 0;
    lat = 1;
    while (!wr_en && lat < 10) begin @(negedge clk); lat++; end
    chk(lat == 1 && wr_addr == AW'(e_addr), $sformatf("write latency %0d addr %0d", lat, wr_addr));
    // random streams, often several requests in a row on one entry
    for (int n = 0; n < 3000; n++) begin
      if (n % 3 != 0) begin
        bx = $urandom_range(0, 1); by = $urandom_range(0, 1);   // entry 0 only
      end else begin
        bx = $urandom_range(0, (W >> L1S) - 1); by = $urandom_range(0, (H >> L1S) - 1);
      end
      @(negedge clk);
      uv <= ($urandom_range(0, 7) != 0);
      ubx <= BXW'(bx); uby <= BYW'(by); uz <= DW'($urandom_range(0, 255));
      #1;
      if (uv) blkz[bx][by] = int'(uz);
    end
    @(negedge clk); uv <= 0;
    repeat (4) @(negedge clk);
    for (int a = 0; a < ENTRIES; a++) begin
      int cx, cy, v [4], best;
      cx = (a % COLS) * 2; cy = (a / COLS) * 2;
      v[0] = blkz[cx][cy]; v[1] = blkz[cx + 1][cy]; v[2] = blkz[cx][cy + 1]; v[3] = blkz[cx + 1][cy + 1];
      best = 0;
      for (int k = 1; k < 4; k++) if (v[k] > v[best]) best = k;
      chk_en <= 1; chk_addr <= AW'(a);
      @(negedge clk);
      chk(chk_data == {2'(best), 8'(v[0]), 8'(v[1]), 8'(v[2]), 8'(v[3])},
          $sformatf("entry %0d = %h", a, chk_data));
    end
    chk(n_bypass > 0, "bypass exercised");
    $display("bypasses=%0d", n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
