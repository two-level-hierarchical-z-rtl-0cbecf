// Self-checking test of the dynamic bi-level HZ entry codec.
//
// Part 1 replays the five-step example of the encoding rules by hand-worked
// entries. Part 2 runs random update sequences on one level-2 block,
// keeping the true farthest depth of each level-1 block here; every new
// depth is no farther than what the entry currently represents for that
// block (as Z-test-passed pixels guarantee). After each update it checks the
// result against a reference of the encoding rules written here, that every
// block's represented depth is at or beyond its true depth, that HHZ is not
// nearer than LHZ, and it counts each encoder branch.
module tb_hz_bilevel_codec;
  localparam int DW = 8;
  localparam int EW = 2 * DW + 4;
  logic [EW-1:0] entry_i, entry_o;
  logic [1:0]    blk, case_o;
  logic [DW-1:0] z, l1 [4], l2;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  hz_bilevel_codec #(.DW(DW)) dut (.entry_i, .upd_blk_i(blk), .upd_z_i(z), .l1_z_o(l1),
                                   .l2_z_o(l2), .entry_o, .case_o);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // reference of the encoding rules; m[k] = 1 means block k is in HHZ group
  function automatic logic [EW-1:0] ref_update(logic [EW-1:0] e, int a, int nz);
    int h, l, dh, dl;
    bit m [4];
    bit others;
    h = int'(e[19:12]);
    l = int'(e[11:4]);
    for (int k = 0; k < 4; k++) m[k] = e[3-k];
    if (m[0] && m[1] && m[2] && m[3]) begin
      l = nz; m[a] = 0;
    end else begin
      dh = (nz > h) ? nz - h : h - nz;
      dl = (nz > l) ? nz - l : l - nz;
      if (dh < dl) begin
        m[a] = 1;
        others = 0;
        for (int k = 0; k < 4; k++) if (k != a && m[k]) others = 1;
        if (!others) h = nz;
      end else begin
        m[a] = 0;
        if (!(m[0] || m[1] || m[2] || m[3])) begin
          h = (nz > l) ? nz : l; l = h;
          for (int k = 0; k < 4; k++) m[k] = 1;
        end else l = (nz > l) ? nz : l;
      end
    end
    return {8'(h), 8'(l), m[0], m[1], m[2], m[3]};
  endfunction

  task automatic apply(int a, int nz);
    blk = 2'(a); z = 8'(nz); #1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t [4];
    int rep;
    // Part 1: worked example
    entry_i = {8'd255, 8'd255, 4'b1111};
    apply(2, 100);                     // first split: LHZ = 100, M2 = 0
    chk(entry_o == {8'd255, 8'd100, 4'b1101} && case_o == 2'd0, "ex1 split");
    entry_i = entry_o; apply(0, 90);   // near LHZ: LHZ = max(90,100)
    chk(entry_o == {8'd255, 8'd100, 4'b0101} && case_o == 2'd2, "ex2 join LHZ");
    entry_i = entry_o; apply(1, 200);  // near HHZ, block 3 still in HHZ group
    chk(entry_o == {8'd255, 8'd100, 4'b0101} && case_o == 2'd1, "ex3 join HHZ");
    entry_i = entry_o; apply(3, 50);   // block 1 still HHZ: LHZ stays 100
    chk(entry_o == {8'd255, 8'd100, 4'b0100} && case_o == 2'd2, "ex4 join LHZ");
    entry_i = entry_o; apply(1, 210);  // only HHZ block rewritten: HHZ = 210
    chk(entry_o == {8'd210, 8'd100, 4'b0100} && case_o == 2'd1, "ex5 HHZ moves");
    entry_i = entry_o; apply(1, 80);   // last HHZ block joins LHZ: collapse
    chk(entry_o == {8'd100, 8'd100, 4'b1111} && case_o == 2'd3, "ex6 collapse");
    chk(l2 == 8'd210 && l1[0] == 8'd100 && l1[1] == 8'd210, "ex6 decode");

    // Part 2: random sequences
    for (int s = 0; s < 300; s++) begin
      entry_i = {8'd255, 8'd255, 4'b1111};
      for (int k = 0; k < 4; k++) t[k] = 255;
      for (int n = 0; n < 40; n++) begin
        int a, nz;
        a = $urandom_range(0, 3);
        #1;
        rep = int'(l1[a]);
        nz = $urandom_range(0, rep);
        if (n % 5 == 4) nz = rep;
        apply(a, nz);
        chk(entry_o == ref_update(entry_i, a, nz),
            $sformatf("ref %h a=%0d z=%0d got %h", entry_i, a, nz, entry_o));
        seen[case_o]++;
        t[a] = nz;
        entry_i = entry_o;
        #1;
        for (int k = 0; k < 4; k++) chk(int'(l1[k]) >= t[k], $sformatf("conservative blk %0d", k));
        chk(l2 >= l1[0] && l2 >= l1[1] && l2 >= l1[2] && l2 >= l1[3], "l2 is farthest");
        chk(entry_i[19:12] >= entry_i[11:4], "HHZ >= LHZ");
      end
    end
    for (int c = 0; c < 4; c++) chk(seen[c] > 0, $sformatf("branch %0d exercised", c));
    $display("branches: split=%0d joinH=%0d joinL=%0d collapse=%0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
