// Self-checking test of the HZ management unit on a 64 x 32 screen with a
// 4-block bit-mask cache and compressed entries. It checks the clear sweep
// length, the exact entries after two level-1 blocks of one level-2 block
// are covered (and that the first becomes visible to a test read exactly
// three cycles after its last pixel), then streams Z-test-passed pixels from
// a Z-buffer model kept here, with full and partial block coverage, and
// checks that every level-1 depth read back is at or beyond the farthest
// Z-buffer depth of its block. Hits, misses, evictions, entry writes and
// update bypasses are counted and must all occur.
module tb_hz_management;
  localparam int W = 64, H = 32, L1S = 3, DW = 8, ZW = 16;
  localparam int COLS = W >> (L1S + 1), ENTRIES = COLS * (H >> (L1S + 1));
  localparam int AW = $clog2(ENTRIES), EW = 2 * DW + 4, XW = $clog2(W), YW = $clog2(H);
  logic clk = 0, rst_n = 0, clear = 0, busy;
  logic rd1_en = 0, zv = 0;
  logic [AW-1:0] rd1_addr = 0;
  logic [EW-1:0] rd0_data, rd1_data;
  logic [XW-1:0] zx = 0;
  logic [YW-1:0] zy = 0;
  logic [ZW-1:0] zz = 0;
  logic hit, miss, evict, hzw, bypass;
  logic [1:0] enc_case;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_evict = 0, n_w = 0, n_byp = 0;
  int zbuf [W][H];

  hz_management #(.WIDTH(W), .HEIGHT(H), .CACHE_BLOCKS(4)) dut (
    .clk, .rst_n, .clear_i(clear), .busy_o(busy),
    .rd0_en_i(1'b0), .rd0_addr_i('0), .rd0_data_o(rd0_data),
    .rd1_en_i(rd1_en), .rd1_addr_i(rd1_addr), .rd1_data_o(rd1_data),
    .zp_valid_i(zv), .zp_x_i(zx), .zp_y_i(zy), .zp_z_i(zz),
    .cache_hit_o(hit), .cache_miss_o(miss), .cache_evict_o(evict), .hz_write_o(hzw),
    .bypass_o(bypass), .enc_case_o(enc_case));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    n_hit += int'(hit); n_miss += int'(miss); n_evict += int'(evict);
    n_w += int'(hzw); n_byp += int'(bypass);
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // read one entry through port 1 (drive at negedge, data at next negedge)
  task automatic read_entry(int a, output logic [EW-1:0] e);
    rd1_en = 1; rd1_addr = AW'(a);
    @(negedge clk);
    rd1_en = 0;
    e = rd1_data;
  endtask

  task automatic zpass(int x, int y, int z);
    zv = 1; zx = XW'(x); zy = YW'(y); zz = ZW'(z);
    @(negedge clk);
    zv = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt, zmax, e1;
    int x, y, z, bx, by, base, lim, mx, rep;
    logic [EW-1:0] e;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    cnt = 0;
    while (busy) begin @(negedge clk); cnt++; end
    chk(cnt == ENTRIES, $sformatf("clear sweep %0d cycles", cnt));
    for (int x = 0; x < W; x++) for (int y = 0; y < H; y++) zbuf[x][y] = 65535;
    read_entry(1, e);
    chk(e == '1, "entry after clear is the far plane");

    // directed: cover level-1 block (bx 2, by 1) = entry 1, sub-block 2
    zmax = 0;
    for (int i = 0; i < 64; i++) begin
      x = 16 + i % 8; y = 8 + i / 8; z = 20000 + 37 * i;
      zbuf[x][y] = z;
      if (z > zmax) zmax = z;
      @(negedge clk);
      zv = 1; zx = XW'(x); zy = YW'(y); zz = ZW'(z);
    end
    // last pixel is being sampled at the coming edge (cycle 0)
    @(negedge clk); zv = 0;              // cycle 1
    @(negedge clk);
    read_entry(1, e);                      // read issued in cycle 2: old value
    chk(e == '1, "entry not yet written two cycles after the last pixel");
    read_entry(1, e);                      // read issued in cycle 3: new value
    e1 = zmax >> 8;
    chk(e == {8'hFF, 8'(e1), 4'b1101}, $sformatf("entry after first block %h", e));
    // cover sub-block 3 of the same entry with a depth close to LHZ
    for (int i = 0; i < 64; i++) begin
      zbuf[24 + i % 8][8 + i / 8] = 20000;
      zpass(24 + i % 8, 8 + i / 8, 20000);
    end
    repeat (3) @(negedge clk);
    read_entry(1, e);
    // 20000>>8 = 78 is nearer to LHZ than to HHZ: joins LHZ = max(78, e1)
    chk(e == {8'hFF, 8'(e1 > 78 ? e1 : 78), 4'b1100}, $sformatf("entry after second block %h", e));

    // random: full and partial coverage of random blocks, Z test modelled here
    for (int n = 0; n < 400; n++) begin
      bx = $urandom_range(0, (W >> L1S) - 1); by = $urandom_range(0, (H >> L1S) - 1);
      base = $urandom_range(0, 60000);
      lim = (n % 3 == 0) ? $urandom_range(1, 63) : 64;
      for (int i = 0; i < lim; i++) begin
        x = bx * 8 + i % 8; y = by * 8 + i / 8; z = base + $urandom_range(0, 3000);
        if (z < zbuf[x][y]) begin
          zbuf[x][y] = z;
          zpass(x, y, z);
        end
      end
      if (n % 7 == 0) begin
        // two full blocks of one entry back to back exercise the bypass
        for (int i = 0; i < 64; i++) for (int b = 0; b < 2; b++) begin
          x = b * 8 + i % 8; y = i / 8; z = base;
          if (z < zbuf[x][y]) zbuf[x][y] = z;
          if (i != 63) zpass(x, y, zbuf[x][y]);
        end
        zv = 1; zx = XW'(7); zy = YW'(7); zz = ZW'(zbuf[7][7]);
        @(negedge clk);
        zx = XW'(15); zy = YW'(7); zz = ZW'(zbuf[15][7]);
        @(negedge clk);
        zv = 0;
      end
    end
    repeat (4) @(negedge clk);
    for (int a = 0; a < ENTRIES; a++) begin
      read_entry(a, e);
      for (int k = 0; k < 4; k++) begin
        bx = (a % COLS) * 2 + k % 2; by = (a / COLS) * 2 + k / 2;
        mx = 0;
        for (int i = 0; i < 64; i++) if (zbuf[bx * 8 + i % 8][by * 8 + i / 8] > mx) mx = zbuf[bx * 8 + i % 8][by * 8 + i / 8];
        rep = e[3 - k] ? int'(e[19:12]) : int'(e[11:4]);
        chk(rep >= (mx >> 8), $sformatf("block (%0d,%0d) HZ %0d below Z max %0d", bx, by, rep, mx >> 8));
      end
    end
    chk(n_hit > 0 && n_miss > 0 && n_evict > 0 && n_w > 2 && n_byp > 0, "all mechanisms exercised");
    $display("hits=%0d misses=%0d evictions=%0d writes=%0d bypasses=%0d", n_hit, n_miss, n_evict, n_w, n_byp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
