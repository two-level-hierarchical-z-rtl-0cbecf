// Self-checking test of the pixel HZ test on a 48 x 32 screen with
// compressed entries held in a memory model here. Random pixels, some off
// the screen, are compared with the decoded level-1 depth worked out here;
// the verdict and the carried pixel must appear two cycles after the input,
// at one pixel per cycle. A second instance with four lanes then takes
// groups of four pixels per cycle, mostly inside one level-2 block and
// sometimes spread over others: lanes in lane 0's block must get their own
// level-1 verdict from a single read, the others must pass untested.
module tb_hz_pixel_test;
  localparam int W = 48, H = 32, L1S = 3, DW = 8, ZW = 16;
  localparam int COLS = W >> (L1S + 1), ENTRIES = COLS * (H >> (L1S + 1));
  localparam int AW = $clog2(ENTRIES), EW = 2 * DW + 4, XW = $clog2(W), YW = $clog2(H);
  logic clk = 0, rst_n = 0;
  logic pv = 0;
  logic [XW-1:0] px = 0, ox;
  logic [YW-1:0] py = 0, oy;
  logic [ZW-1:0] pz = 0, oz;
  logic rd_en, ov, op;
  logic [AW-1:0] rd_addr;
  logic [EW-1:0] rd_data, mem [ENTRIES];
  int checks = 0, failures = 0, n_rej = 0, n_pass = 0;
  int q_x [$], q_y [$], q_z [$], q_p [$], q_c [$];
  int cyc = 0;
  localparam int L = 4;
  logic [L-1:0] pv4 = 0, ov4, op4;
  logic [L-1:0][XW-1:0] px4 = 0, ox4;
  logic [L-1:0][YW-1:0] py4 = 0, oy4;
  logic [L-1:0][ZW-1:0] pz4 = 0, oz4;
  logic rd_en4;
  logic [AW-1:0] rd_addr4;
  logic [EW-1:0] rd_data4;
  int q4_v [$], q4_p [$], q4_c [$], q4_x [$], q4_y [$], q4_z [$];
  int n4_tested = 0, n4_untested = 0, n4_full = 0, n4_rej = 0;

  hz_pixel_test #(.WIDTH(W), .HEIGHT(H)) dut (
    .clk, .rst_n, .pix_valid_i(pv), .pix_x_i(px), .pix_y_i(py), .pix_z_i(pz),
    .rd_en_o(rd_en), .rd_addr_o(rd_addr), .rd_data_i(rd_data),
    .out_valid_o(ov), .out_pass_o(op), .out_x_o(ox), .out_y_o(oy), .out_z_o(oz));

  hz_pixel_test #(.WIDTH(W), .HEIGHT(H), .LANES(L)) dut4 (
    .clk, .rst_n, .pix_valid_i(pv4), .pix_x_i(px4), .pix_y_i(py4), .pix_z_i(pz4),
    .rd_en_o(rd_en4), .rd_addr_o(rd_addr4), .rd_data_i(rd_data4),
    .out_valid_o(ov4), .out_pass_o(op4), .out_x_o(ox4), .out_y_o(oy4), .out_z_o(oz4));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rd_en) rd_data <= mem[rd_addr];
    if (rd_en4) rd_data4 <= mem[rd_addr4];
  end

  // one queue element per group: lane valid mask, expected verdicts, cycle;
  // coordinates packed per lane
  always @(negedge clk) if (rst_n && ov4 != 0) begin
    chk(q4_v.size() > 0, "group output without input");
    if (q4_v.size() > 0) begin
      chk(int'(ov4) == q4_v[0], "group lane valid");
      chk(cyc - q4_c[0] == 2, "group latency");
      for (int l = 0; l < L; l++) if (q4_v[0][l]) begin
        chk(op4[l] == q4_p[0][l], $sformatf("lane %0d verdict", l));
        chk(int'(ox4[l]) == ((q4_x[0] >> (8 * l)) & 255) &&
            int'(oy4[l]) == ((q4_y[0] >> (8 * l)) & 255), "lane pixel carried");
        n4_rej += int'(!op4[l]);
      end
      chk(int'(oz4[0]) == q4_z[0], "lane 0 depth carried");
      void'(q4_v.pop_front()); void'(q4_p.pop_front()); void'(q4_c.pop_front());
      void'(q4_x.pop_front()); void'(q4_y.pop_front()); void'(q4_z.pop_front());
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(negedge clk) if (rst_n && ov) begin
    chk(q_x.size() > 0, "output without input");
    if (q_x.size() > 0) begin
      chk(int'(ox) == q_x[0] && int'(oy) == q_y[0] && int'(oz) == q_z[0], "pixel carried");
      chk(int'(op) == q_p[0], $sformatf("verdict (%0d,%0d) z %0d", ox, oy, oz));
      chk(cyc - q_c[0] == 2, "latency");
      n_rej += int'(!op); n_pass += int'(op);
      void'(q_x.pop_front()); void'(q_y.pop_front()); void'(q_z.pop_front());
      void'(q_p.pop_front()); void'(q_c.pop_front());
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < ENTRIES; a++) begin
      logic [7:0] h, l;
      h = 8'($urandom_range(0, 255)); l = 8'($urandom_range(0, h));
      mem[a] = {h, l, 4'($urandom)};
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 5000; n++) begin
      int x, y, z, a, k, l1v;
      bit pass;
      logic [EW-1:0] e;
      x = $urandom_range(0, (n % 10 == 0) ? 63 : W - 1); y = $urandom_range(0, H - 1);
      z = $urandom_range(0, 65535);
      @(negedge clk);
      pv = ($urandom_range(0, 5) != 0);
      px = XW'(x); py = YW'(y); pz = ZW'(z);
      if (pv) begin
        if (x >= W) pass = 1;
        else begin
          a = (y / 16) * COLS + x / 16;
          k = ((y / 8) % 2) * 2 + (x / 8) % 2;
          e = mem[a];
          l1v = e[3 - k] ? int'(e[19:12]) : int'(e[11:4]);
          pass = !((z >> 8) > l1v);
        end
        q_x.push_back(x); q_y.push_back(y); q_z.push_back(z); q_p.push_back(int'(pass));
        q_c.push_back(cyc);
      end
    end
    @(negedge clk); pv = 0;
    repeat (4) @(negedge clk);
    chk(q_x.size() == 0, "every pixel answered");
    chk(n_rej > 0 && n_pass > 0, "both verdicts seen");
    $display("rejected=%0d passed=%0d", n_rej, n_pass);

    // four lanes per cycle
    for (int n = 0; n < 5000; n++) begin
      int bx, by, x, y, z, a, k, l1v, vm, pm, xs, ys, ntest;
      logic [EW-1:0] e;
      bx = $urandom_range(0, W / 16 - 1); by = $urandom_range(0, H / 16 - 1);
      vm = 0; pm = 0; xs = 0; ys = 0; ntest = 0;
      @(negedge clk);
      for (int l = 0; l < L; l++) begin
        bit v, pass;
        v = (l == 0) || ($urandom_range(0, 7) != 0);
        if ((l != 0) && ($urandom_range(0, 5) == 0)) begin
          x = $urandom_range(0, 63); y = $urandom_range(0, H - 1);   // anywhere
        end else begin
          x = bx * 16 + $urandom_range(0, 15); y = by * 16 + $urandom_range(0, 15);
        end
        if (l == 0 && $urandom_range(0, 9) == 0) x = $urandom_range(W, 63);  // lane 0 off screen
        z = $urandom_range(0, 65535);
        pv4[l] = v; px4[l] = XW'(x); py4[l] = YW'(y); pz4[l] = ZW'(z);
        if (l == 0) q4_z.push_back(z);
        if (x < W && x / 16 == int'(px4[0]) / 16 && y / 16 == int'(py4[0]) / 16) begin
          a = (y / 16) * COLS + x / 16;
          k = ((y / 8) % 2) * 2 + (x / 8) % 2;
          e = mem[a];
          l1v = e[3 - k] ? int'(e[19:12]) : int'(e[11:4]);
          pass = !((z >> 8) > l1v);
          if (v) begin n4_tested++; ntest++; end
        end else begin
          pass = 1;
          if (v) n4_untested++;
        end
        vm |= int'(v) << l; pm |= int'(pass) << l;
        xs |= x << (8 * l); ys |= y << (8 * l);
      end
      if (ntest == L) n4_full++;
      q4_v.push_back(vm); q4_p.push_back(pm); q4_c.push_back(cyc);
      q4_x.push_back(xs); q4_y.push_back(ys);
      #1 chk(rd_en4 == (ntest > 0), "one read per group when a lane is tested");
    end
    @(negedge clk); pv4 = 0;
    repeat (4) @(negedge clk);
    chk(q4_v.size() == 0, "every group answered");
    chk(n4_full > 0, "four pixels tested in one cycle");
    chk(n4_untested > 0, "lanes outside the group's block");
    chk(n4_rej > 0, "lane discards");
    $display("lanes: tested=%0d untested=%0d full groups=%0d rejected=%0d",
             n4_tested, n4_untested, n4_full, n4_rej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
