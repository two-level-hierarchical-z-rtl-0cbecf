// Scene runner used by the configuration sweep: the same rendering
// pipeline model, scene and checks as the end-to-end test of the default
// configuration, for an HZ unit built with the given screen size, block
// size (L1S: level-1 blocks are 2^L1S pixels square), HZ depth accuracy,
// bit-mask cache size, entry format and pixel-test lane count (LANES
// pixels sent per cycle, in raster order; the pixels that pass the
// Z-buffer test queue up for the one-per-cycle return port). It reports its check counts, the
// size of the HZ-buffer memory as built, and (printed) the share of
// triangles and pixels the unit discarded, when done_o rises.
module hz_scene_runner #(
  parameter int W = 1280, parameter int H = 1024, parameter int L1S = 3, parameter int DW = 8,
  parameter int CACHE = 64, parameter bit COMPRESS = 1'b1, parameter int LANES = 1,
  parameter string NAME = "default"
) (
  output logic done_o,
  output int   checks_o,
  output int   failures_o,
  output int   mem_bits_o
);
  localparam int XW = $clog2(W), YW = $clog2(H), ZW = 16;
  localparam int B1 = 1 << L1S, B2 = 2 * B1;
  localparam int COLS = W / B2, ENTRIES = COLS * (H / B2);
  localparam int EW = COMPRESS ? 2 * DW + 4 : 4 * DW + 2;

  logic clk = 0, rst_n = 0, clear = 0, busy;
  logic tv = 0, tready, tov, tpass, trej2, trej1, tstr;
  logic [XW-1:0] vx [3];
  logic [YW-1:0] vy [3];
  logic [ZW-1:0] vz [3];
  logic [15:0] tid = 0, toid;
  logic pready;
  logic [LANES-1:0] pv = 0, pov, ppass;
  logic [LANES-1:0][XW-1:0] px = 0, pox;
  logic [LANES-1:0][YW-1:0] py = 0, poy;
  logic [LANES-1:0][ZW-1:0] pz = 0, poz;
  logic zv = 0;
  logic [XW-1:0] zx = 0;
  logic [YW-1:0] zy = 0;
  logic [ZW-1:0] zz = 0;
  logic hit, miss, evict, hzw, bypass;
  logic [1:0] enc_case;

  hz_top #(.WIDTH(W), .HEIGHT(H), .L1_SHIFT(L1S), .DW(DW), .CACHE_BLOCKS(CACHE),
           .COMPRESS(COMPRESS), .PIX_LANES(LANES)) dut (
    .clk, .rst_n, .clear_i(clear), .busy_o(busy),
    .tri_valid_i(tv), .tri_ready_o(tready), .tri_vx_i(vx), .tri_vy_i(vy), .tri_vz_i(vz),
    .tri_id_i(tid), .tri_out_valid_o(tov), .tri_out_pass_o(tpass), .tri_out_id_o(toid),
    .tri_rej_l2_o(trej2), .tri_rej_l1_o(trej1), .tri_straddle_o(tstr),
    .pix_valid_i(pv), .pix_ready_o(pready), .pix_x_i(px), .pix_y_i(py), .pix_z_i(pz),
    .pix_out_valid_o(pov), .pix_out_pass_o(ppass), .pix_out_x_o(pox), .pix_out_y_o(poy),
    .pix_out_z_o(poz),
    .zp_valid_i(zv), .zp_x_i(zx), .zp_y_i(zy), .zp_z_i(zz),
    .cache_hit_o(hit), .cache_miss_o(miss), .cache_evict_o(evict), .hz_write_o(hzw),
    .bypass_o(bypass), .enc_case_o(enc_case));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  assign checks_o = checks;
  assign failures_o = failures;
  initial done_o = 1'b0;
  assign mem_bits_o = $size(dut.u_mgmt.u_buf.mem) * $bits(dut.u_mgmt.u_buf.mem[0]);
  int cyc = 0;
  logic [15:0] zbuf [W * H];
  logic [15:0] zref [W * H];
  int n_rej2 = 0, n_rej1 = 0, n_str = 0, n_tpass = 0, n_prej = 0, n_ppass = 0;
  longint n_rpix = 0, n_tpix_saved = 0;  // rasterized pixels; those of discarded triangles
  int n_multi = 0;
  int n_hit = 0, n_miss = 0, n_evict = 0, n_w = 0, n_byp = 0, n_stall = 0, n_zfail = 0;
  int n_case [4] = '{0, 0, 0, 0};
  int t_sent = 0, t_pass = 0, t_done = 0;
  int p_cyc [$];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  int busy_run = 0, last_busy = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (busy) busy_run++;
    else if (busy_run > 0) begin last_busy = busy_run; busy_run = 0; end
    n_hit += int'(hit); n_miss += int'(miss); n_evict += int'(evict);
    n_w += int'(hzw); n_byp += int'(bypass);
    if (hzw) n_case[enc_case]++;
  end

  // triangle verdicts
  always @(negedge clk) if (rst_n && tov) begin
    chk(cyc - t_sent == 2 && int'(toid) == int'(tid), "triangle verdict latency");
    t_pass = int'(tpass);
    t_done = 1;
    n_rej2 += int'(trej2); n_rej1 += int'(trej1); n_str += int'(tstr); n_tpass += int'(tpass);
  end

  // pixel verdicts, Z-buffer test and return of the passing pixels
  int zq_x [$], zq_y [$], zq_z [$];
  always @(negedge clk) begin
    int a;
    zv = 0;
    if (rst_n && pov != 0) begin
      chk(p_cyc.size() > 0 && cyc - p_cyc[0] == 2, "pixel verdict latency");
      if (p_cyc.size() > 0) void'(p_cyc.pop_front());
      for (int l = 0; l < LANES; l++) if (pov[l]) begin
        a = int'(poy[l]) * W + int'(pox[l]);
        if (!ppass[l]) begin
          n_prej++;
          chk(poz[l] >= zbuf[a], $sformatf("discarded pixel (%0d,%0d) z %0d is visible (zbuf %0d)",
                                           pox[l], poy[l], poz[l], zbuf[a]));
        end else begin
          n_ppass++;
          if (poz[l] < zbuf[a]) begin
            zbuf[a] = poz[l];
            zq_x.push_back(int'(pox[l])); zq_y.push_back(int'(poy[l])); zq_z.push_back(int'(poz[l]));
          end else n_zfail++;
        end
      end
    end
    if (zq_x.size() > 0) begin
      zv = 1; zx = XW'(zq_x.pop_front()); zy = YW'(zq_y.pop_front()); zz = ZW'(zq_z.pop_front());
    end
  end

  // rasterized pixels of the current triangle
  int qx [$], qy [$], qz [$];

  function automatic longint edge_fn(int ax, int ay, int bx, int by, int cx, int cy);
    return longint'(bx - ax) * longint'(cy - ay) - longint'(by - ay) * longint'(cx - ax);
  endfunction

  task automatic raster(int x0, int y0, int z0, int x1, int y1, int z1, int x2, int y2, int z2);
    longint ar, w0, w1, w2;
    int xmn, xmx, ymn, ymx, zmn, zmx, zi;
    real zr;
    qx.delete(); qy.delete(); qz.delete();
    ar = edge_fn(x0, y0, x1, y1, x2, y2);
    if (ar == 0) return;
    xmn = x0; xmx = x0; ymn = y0; ymx = y0; zmn = z0; zmx = z0;
    if (x1 < xmn) xmn = x1; if (x2 < xmn) xmn = x2; if (x1 > xmx) xmx = x1; if (x2 > xmx) xmx = x2;
    if (y1 < ymn) ymn = y1; if (y2 < ymn) ymn = y2; if (y1 > ymx) ymx = y1; if (y2 > ymx) ymx = y2;
    if (z1 < zmn) zmn = z1; if (z2 < zmn) zmn = z2; if (z1 > zmx) zmx = z1; if (z2 > zmx) zmx = z2;
    for (int y = ymn; y <= ymx; y++)
      for (int x = xmn; x <= xmx; x++) begin
        w0 = edge_fn(x1, y1, x2, y2, x, y);
        w1 = edge_fn(x2, y2, x0, y0, x, y);
        w2 = edge_fn(x0, y0, x1, y1, x, y);
        if ((ar > 0 && w0 >= 0 && w1 >= 0 && w2 >= 0) || (ar < 0 && w0 <= 0 && w1 <= 0 && w2 <= 0)) begin
          zr = (real'(w0) * z0 + real'(w1) * z1 + real'(w2) * z2) / real'(ar);
          zi = int'(zr);
          if (zi < zmn) zi = zmn;
          if (zi > zmx) zi = zmx;
          qx.push_back(x); qy.push_back(y); qz.push_back(zi);
        end
      end
  endtask

  // one triangle through the whole pipeline
  task automatic draw(int x0, int y0, int z0, int x1, int y1, int z1, int x2, int y2, int z2);
    raster(x0, y0, z0, x1, y1, z1, x2, y2, z2);
    n_rpix += qx.size();
    foreach (qx[i]) begin
      int a;
      a = qy[i] * W + qx[i];
      if (qz[i] < zref[a]) zref[a] = 16'(qz[i]);
    end
    vx[0] = XW'(x0); vy[0] = YW'(y0); vz[0] = ZW'(z0);
    vx[1] = XW'(x1); vy[1] = YW'(y1); vz[1] = ZW'(z1);
    vx[2] = XW'(x2); vy[2] = YW'(y2); vz[2] = ZW'(z2);
    tid = tid + 1;
    tv = 1;
    while (!tready) begin n_stall++; @(negedge clk); end
    t_sent = cyc;
    t_done = 0;
    @(negedge clk);
    tv = 0;
    while (!t_done) @(negedge clk);
    if (t_pass) begin
      for (int i = 0; i < qx.size(); i += LANES) begin
        for (int l = 0; l < LANES; l++) begin
          pv[l] = (i + l < qx.size());
          if (pv[l]) begin px[l] = XW'(qx[i + l]); py[l] = YW'(qy[i + l]); pz[l] = ZW'(qz[i + l]); end
        end
        n_multi += int'(LANES > 1 && pv[LANES-1]);
        p_cyc.push_back(cyc);
        @(negedge clk);
      end
      pv = '0;
      repeat (3) @(negedge clk);
      // the Z-buffer stage returns one pixel per cycle: let it catch up
      while (zq_x.size() > 0) @(negedge clk);
    end else begin
      foreach (qx[i]) chk(16'(qz[i]) >= zbuf[qy[i] * W + qx[i]], "discarded triangle is visible");
      n_tpix_saved += qx.size();
    end
  endtask

  task automatic rect(int x0, int y0, int x1, int y1, int z);
    draw(x0, y0, z, x1, y0, z, x1, y1, z);
    draw(x0, y0, z, x1, y1, z, x0, y1, z);
  endtask

  task automatic small_tri(int cx, int cy, int sz, int zlo, int zhi);
    draw(cx + $urandom_range(0, sz), cy + $urandom_range(0, sz), $urandom_range(zlo, zhi),
         cx + $urandom_range(0, sz), cy + $urandom_range(0, sz), $urandom_range(zlo, zhi),
         cx + $urandom_range(0, sz), cy + $urandom_range(0, sz), $urandom_range(zlo, zhi));
  endtask

  task automatic frame_clear();
    int n;
    while (zq_x.size() > 0) @(negedge clk);
    repeat (4) @(negedge clk);
    for (int i = 0; i < W * H; i++) begin zbuf[i] = 16'hFFFF; zref[i] = 16'hFFFF; end
    clear = 1;
    @(negedge clk);
    clear = 0;
    n = 0;
    while (busy) begin n++; @(negedge clk); if (n == 100) draw(5, 5, 100, 9, 5, 100, 5, 9, 100); end
    @(negedge clk);
    chk(last_busy == ENTRIES, $sformatf("clear sweep lasted %0d cycles", last_busy));
  endtask

  task automatic check_frame();
    int bad, mx, rep, a;
    logic [EW-1:0] e;
    bad = 0;
    for (int i = 0; i < W * H; i++) if (zbuf[i] != zref[i]) bad++;
    chk(bad == 0, $sformatf("%0d Z-buffer pixels differ from the unculled rendering", bad));
    bad = 0;
    for (int by = 0; by < H / B1; by++)
      for (int bx = 0; bx < W / B1; bx++) begin
        int k;
        mx = 0;
        for (int j = 0; j < B1 * B1; j++) begin
          a = (by * B1 + j / B1) * W + bx * B1 + j % B1;
          if (int'(zbuf[a]) > mx) mx = int'(zbuf[a]);
        end
        e = dut.u_mgmt.u_buf.mem[(by / 2) * COLS + bx / 2];
        k = (by % 2) * 2 + bx % 2;
        if (COMPRESS) rep = e[3 - k] ? int'(e[EW-1 -: DW]) : int'(e[4 +: DW]);
        else          rep = int'(e[(3 - k) * DW +: DW]);
        if (rep < (mx >> (ZW - DW))) bad++;
      end
    chk(bad == 0, $sformatf("%0d level-1 blocks hold an HZ depth nearer than their Z buffer", bad));
  endtask

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("%s: watchdog expired", NAME);
    done_o = 1'b1;
  end

  initial begin
    for (int k = 0; k < 3; k++) begin vx[k] = 0; vy[k] = 0; vz[k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // ---- frame 1 ----
    frame_clear();
    rect(0, 0, 255, 255, 10000);                        // near square
    rect(512, 512, 512 + B1 - 1, 512 + B1 - 1, 8000);  // one level-1 block
    rect(512 + B1, 512, 512 + B2 - 1, 512 + B1 - 1, 62000);  // its neighbour, far
    for (int n = 0; n < 150; n++)                       // far, behind the square
      small_tri($urandom_range(0, 240), $urandom_range(0, 240), $urandom_range(2, 12), 30000, 40000);
    for (int n = 0; n < 20; n++)                        // far, behind the lone block
      small_tri(512, 512, B1 - 2, 20000, 30000);
    for (int n = 0; n < 25; n++)                        // larger, partly behind the square
      small_tri($urandom_range(150, 260), $urandom_range(150, 260), 40, 20000, 40000);
    for (int n = 0; n < 30; n++)                        // near, in front of the square
      small_tri($urandom_range(0, 240), $urandom_range(0, 240), 10, 3000, 6000);
    for (int n = 0; n < 300; n++)                       // scattered over the screen
      small_tri($urandom_range(0, W - 12), $urandom_range(0, H - 12), 10, 0, 65535);
    // two level-1 blocks of one level-2 block completed on consecutive pixels
    rect(640, 640, 640 + B2 - 1, 640 + B1 - 2, 9000);
    draw(640, 639 + B1, 9000, 638 + B1, 639 + B1, 9000, 638 + B1, 640 + B1, 9000);
    draw(641 + B1, 639 + B1, 9000, 639 + B2, 639 + B1, 9000, 639 + B2, 640 + B1, 9000);
    draw(639 + B1, 639 + B1, 9000, 640 + B1, 639 + B1, 9000, 640 + B1, 640 + B1, 9000);
    rect(0, 0, W - 1, H - 1, 64000);                    // far background last
    while (zq_x.size() > 0) @(negedge clk);
    repeat (8) @(negedge clk);
    check_frame();
    // ---- frame 2: clear with a triangle waiting, then a smaller scene ----
    frame_clear();
    rect(256, 256, 511, 511, 20000);
    for (int n = 0; n < 60; n++)
      small_tri($urandom_range(256, 500), $urandom_range(256, 500), 12, 30000, 50000);
    while (zq_x.size() > 0) @(negedge clk);
    repeat (8) @(negedge clk);
    check_frame();

    chk(n_rej2 > 0, "level-2 triangle discard occurred");
    chk(n_rej1 > 0, "level-1 triangle discard occurred");
    chk(n_str > 0, "straddling triangle occurred");
    chk(n_prej > 0, "pixel discard occurred");
    chk(n_hit > 0 && n_miss > 0 && n_evict > 0, "cache hit, miss and eviction occurred");
    chk(n_w > 0, "HZ-buffer write occurred");
    chk(n_byp > 0, "update bypass occurred");
    if (COMPRESS) for (int c = 0; c < 4; c++) chk(n_case[c] > 0, $sformatf("encoder branch %0d occurred", c));
    chk(n_stall > 0, "stall during clear occurred");
    if (LANES > 1) chk(n_multi > 0, "groups of several pixels occurred");
    $display("%-22s triangles discarded %5.1f%% (l2 %0d, l1 %0d of %0d), pixels discarded %5.1f%% of %0d, evictions %0d",
             NAME, 100.0 * (n_rej2 + n_rej1) / (n_rej2 + n_rej1 + n_tpass), n_rej2, n_rej1,
             n_rej2 + n_rej1 + n_tpass, 100.0 * n_prej / (n_prej + n_ppass), n_prej + n_ppass, n_evict);
    $display("%-22s Z-buffer reads avoided %5.1f%% of %0d rasterized pixels", NAME,
             100.0 * real'(n_tpix_saved + n_prej) / real'(n_rpix), n_rpix);
    done_o = 1'b1;
  end
endmodule
