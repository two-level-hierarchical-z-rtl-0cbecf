// Self-checking test of the bit-mask cache against a reference model kept
// here: random pixels over more level-1 blocks than the cache holds, so
// hits, misses, FIFO replacement of live entries and full-coverage updates
// all occur. Every cycle the hit / miss / evict pulses and each update
// (block and tmpZ) are compared with the model; a directed part covers one
// block pixel by pixel and checks that the update appears exactly when the
// last pixel arrives, one cycle later, carrying the farthest depth.
module tb_bitmask_cache;
  localparam int N = 4, L1S = 2, DW = 8, BXW = 4, BYW = 4;
  localparam int MB = 1 << (2 * L1S);
  logic clk = 0, rst_n = 0, clear = 0;
  logic pv = 0;
  logic [BXW-1:0] bx = 0, ubx;
  logic [BYW-1:0] by = 0, uby;
  logic [2*L1S-1:0] sub = 0;
  logic [DW-1:0] z = 0, uz;
  logic uv, hit, miss, evict;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_evict = 0, n_upd = 0;

  bitmask_cache #(.CACHE_BLOCKS(N), .L1_SHIFT(L1S), .DW(DW), .BXW(BXW), .BYW(BYW)) dut (
    .clk, .rst_n, .clear_i(clear), .pix_valid_i(pv), .pix_bx_i(bx), .pix_by_i(by),
    .pix_sub_i(sub), .pix_z_i(z), .upd_valid_o(uv), .upd_bx_o(ubx), .upd_by_o(uby),
    .upd_z_o(uz), .hit_o(hit), .miss_o(miss), .evict_o(evict));

  always #5 clk = ~clk;

  // reference model
  bit          m_valid [N];
  int          m_bx [N], m_by [N], m_tz [N];
  bit [MB-1:0] m_mask [N];
  int          m_ptr;
  bit          e_uv, e_hit, e_miss, e_evict;
  int          e_bx, e_by, e_z;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic model_pixel(int px, int py, int ps, int pz);
    int s = -1;
    for (int i = 0; i < N; i++) if (m_valid[i] && m_bx[i] == px && m_by[i] == py) s = i;
    e_hit = (s >= 0); e_miss = (s < 0); e_evict = 0; e_uv = 0;
    if (s < 0) begin
      s = m_ptr;
      e_evict = m_valid[s];
      m_valid[s] = 1; m_bx[s] = px; m_by[s] = py; m_mask[s] = '0; m_tz[s] = 0;
      m_ptr = (m_ptr + 1) % N;
    end
    m_mask[s][ps] = 1;
    if (pz > m_tz[s]) m_tz[s] = pz;
    if (&m_mask[s]) begin
      e_uv = 1; e_bx = px; e_by = py; e_z = m_tz[s];
      m_mask[s] = '0; m_tz[s] = 0;
    end
  endtask

  // drive one pixel, then compare the registered outputs with the model
  task automatic send(int px, int py, int ps, int pz);
    @(negedge clk);
    pv <= 1; bx <= BXW'(px); by <= BYW'(py); sub <= (2*L1S)'(ps); z <= DW'(pz);
    model_pixel(px, py, ps, pz);
    @(negedge clk);
    pv <= 0;
    chk(hit == e_hit && miss == e_miss && evict == e_evict,
        $sformatf("flags h%0d m%0d e%0d exp h%0d m%0d e%0d", hit, miss, evict, e_hit, e_miss, e_evict));
    chk(uv == e_uv, "update valid");
    if (e_uv) chk(ubx == BXW'(e_bx) && uby == BYW'(e_by) && uz == DW'(e_z), "update contents");
    n_hit += int'(hit); n_miss += int'(miss); n_evict += int'(evict); n_upd += int'(uv);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm [MB];
    int zmax;
    for (int i = 0; i < N; i++) m_valid[i] = 0;
    m_ptr = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // directed: cover block (3,5) in a shuffled order
    for (int i = 0; i < MB; i++) perm[i] = i;
    perm.shuffle();
    zmax = 0;
    for (int i = 0; i < MB; i++) begin
      int zz;
      zz = $urandom_range(10, 200);
      if (zz > zmax) zmax = zz;
      send(3, 5, perm[i], zz);
      chk(uv == (i == MB - 1), $sformatf("update only on last pixel (%0d)", i));
    end
    chk(uz == DW'(zmax), "tmpZ is the farthest depth");
    // random traffic over 6 blocks with a 4-entry cache
    for (int n = 0; n < 20000; n++) begin
      int b;
      b = (n % 97 < 60) ? $urandom_range(0, 1) : $urandom_range(0, 5);
      send(b, b + 1, $urandom_range(0, MB - 1), $urandom_range(0, 255));
    end
    // clear invalidates everything: next pixel of a known block misses
    @(negedge clk); clear <= 1; @(negedge clk); clear <= 0;
    for (int i = 0; i < N; i++) m_valid[i] = 0;
    m_ptr = 0;
    send(0, 1, 0, 5);
    chk(miss == 1, "miss after clear");
    chk(n_hit > 0 && n_miss > 0 && n_evict > 0 && n_upd > 1, "all mechanisms exercised");
    $display("hits=%0d misses=%0d evictions=%0d updates=%0d", n_hit, n_miss, n_evict, n_upd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
