// Self-checking test of the uncompressed HZ entry codec: random entries,
// sub-block numbers and depths; the decoded level-1 / level-2 depths and
// the updated entry (new depth in place, index naming the lowest-numbered
// farthest block) are checked against values computed here.
module tb_hz_raw_codec;
  localparam int DW = 8;
  localparam int EW = 4 * DW + 2;
  logic [EW-1:0] entry_i, entry_o;
  logic [1:0]    blk;
  logic [DW-1:0] z, l1 [4], l2;
  int checks = 0, failures = 0;

  hz_raw_codec #(.DW(DW)) dut (.entry_i, .upd_blk_i(blk), .upd_z_i(z), .l1_z_o(l1), .l2_z_o(l2), .entry_o);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [4];
    int nv [4];
    int idx, best;
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < 4; k++) v[k] = $urandom_range(0, 255);
      if (n % 7 == 0) v[1] = v[0];          // ties
      idx = $urandom_range(0, 3);
      entry_i = {2'(idx), 8'(v[0]), 8'(v[1]), 8'(v[2]), 8'(v[3])};
      blk = 2'($urandom_range(0, 3));
      z   = 8'($urandom_range(0, 255));
      #1;
      for (int k = 0; k < 4; k++) chk(l1[k] == 8'(v[k]), $sformatf("decode l1[%0d]", k));
      chk(l2 == 8'(v[idx]), "decode l2 via index");
      for (int k = 0; k < 4; k++) nv[k] = (k == int'(blk)) ? int'(z) : v[k];
      best = 0;
      for (int k = 1; k < 4; k++) if (nv[k] > nv[best]) best = k;
      chk(entry_o == {2'(best), 8'(nv[0]), 8'(nv[1]), 8'(nv[2]), 8'(nv[3])},
          $sformatf("update %h blk %0d z %0d -> %h", entry_i, blk, z, entry_o));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
