// Self-checking test of the triangle HZ test on a 64 x 64 screen with
// compressed entries held in a memory model here. Random triangles (tiny
// ones inside a level-1 block, medium ones inside a level-2 block, and
// large straddling ones) are tested against random entries; the expected
// verdict, computed here from the nearest vertex depth, the bounding box
// and the decoded entry, is compared with the block's output, which must
// appear exactly two cycles after the input.
module tb_hz_tri_test;
  localparam int W = 64, H = 64, L1S = 3, DW = 8, ZW = 16;
  localparam int COLS = W >> (L1S + 1), ENTRIES = COLS * (H >> (L1S + 1));
  localparam int AW = $clog2(ENTRIES), EW = 2 * DW + 4, XW = $clog2(W), YW = $clog2(H);
  logic clk = 0, rst_n = 0;
  logic tv = 0;
  logic [XW-1:0] vx [3];
  logic [YW-1:0] vy [3];
  logic [ZW-1:0] vz [3];
  logic [15:0] id = 0, oid;
  logic rd_en, ov, op, r2, r1, st;
  logic [AW-1:0] rd_addr;
  logic [EW-1:0] rd_data, mem [ENTRIES];
  int checks = 0, failures = 0, n_r2 = 0, n_r1 = 0, n_st = 0, n_pass = 0;
  int exp_pass [int], exp_r2 [int], exp_r1 [int], exp_st [int], sent_cyc [int];
  int cyc = 0;

  hz_tri_test #(.WIDTH(W), .HEIGHT(H)) dut (
    .clk, .rst_n, .tri_valid_i(tv), .vx_i(vx), .vy_i(vy), .vz_i(vz), .tri_id_i(id),
    .rd_en_o(rd_en), .rd_addr_o(rd_addr), .rd_data_i(rd_data),
    .out_valid_o(ov), .out_pass_o(op), .out_id_o(oid),
    .out_rej_l2_o(r2), .out_rej_l1_o(r1), .out_straddle_o(st));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rd_en) rd_data <= mem[rd_addr];
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(negedge clk) if (rst_n && ov) begin
    int i;
    i = int'(oid);
    chk(exp_pass.exists(i), "unexpected id");
    if (exp_pass.exists(i)) begin
      chk(op == exp_pass[i][0] && r2 == exp_r2[i][0] && r1 == exp_r1[i][0] && st == exp_st[i][0],
          $sformatf("tri %0d pass %0d r2 %0d r1 %0d st %0d", i, op, r2, r1, st));
      chk(cyc - sent_cyc[i] == 2, $sformatf("latency %0d", cyc - sent_cyc[i]));
      n_r2 += int'(r2); n_r1 += int'(r1); n_st += int'(st); n_pass += int'(op);
      exp_pass.delete(i);
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
      h = 8'($urandom_range(60, 255)); l = 8'($urandom_range(0, h));
      mem[a] = {h, l, 4'($urandom)};
    end
    for (int k = 0; k < 3; k++) begin vx[k] = 0; vy[k] = 0; vz[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 4000; n++) begin
      int ox, oy, sz, xmn, xmx, ymn, ymx, zmn, a, k, l1v, l2v;
      int t;
      logic [EW-1:0] e;
      bit in2, in1, rej2, rej1;
      t = $urandom_range(0, 2);
      sz = (t == 0) ? 7 : (t == 1) ? 15 : 63;
      ox = $urandom_range(0, W - 1 - sz); oy = $urandom_range(0, H - 1 - sz);
      @(negedge clk);
      xmn = W; xmx = -1; ymn = H; ymx = -1; zmn = 1 << 20;
      for (int v = 0; v < 3; v++) begin
        int xx, yy, zz;
        xx = ox + $urandom_range(0, sz); yy = oy + $urandom_range(0, sz); zz = $urandom_range(0, 65535);
        vx[v] = XW'(xx); vy[v] = YW'(yy); vz[v] = ZW'(zz);
        if (xx < xmn) xmn = xx; if (xx > xmx) xmx = xx;
        if (yy < ymn) ymn = yy; if (yy > ymx) ymx = yy;
        if (zz < zmn) zmn = zz;
      end
      id = 16'(n);
      tv = 1;
      in2 = (xmn / 16 == xmx / 16) && (ymn / 16 == ymx / 16);
      in1 = (xmn / 8 == xmx / 8) && (ymn / 8 == ymx / 8);
      a = (ymn / 16) * COLS + xmn / 16;
      k = ((ymn / 8) % 2) * 2 + (xmn / 8) % 2;
      e = mem[a];
      l2v = int'(e[19:12]);
      l1v = e[3 - k] ? int'(e[19:12]) : int'(e[11:4]);
      rej2 = in2 && ((zmn >> 8) > l2v);
      rej1 = !rej2 && in1 && ((zmn >> 8) > l1v);
      exp_pass[n] = int'(!(rej2 || rej1)); exp_r2[n] = int'(rej2); exp_r1[n] = int'(rej1);
      exp_st[n] = int'(!in2);
      sent_cyc[n] = cyc;
    end
    @(negedge clk); tv = 0;
    repeat (4) @(negedge clk);
    chk(exp_pass.num() == 0, "every triangle answered");
    chk(n_r2 > 0 && n_r1 > 0 && n_st > 0 && n_pass > 0, "every verdict seen");
    $display("rej_l2=%0d rej_l1=%0d straddle=%0d pass=%0d", n_r2, n_r1, n_st, n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
