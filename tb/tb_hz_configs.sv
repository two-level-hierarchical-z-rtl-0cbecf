// Configuration sweep: the HZ-buffer configurations the design is evaluated
// in, each built at 1280 x 1024 and taken through the same two-frame scene
// with the correctness checks of the end-to-end test (no visible triangle
// or pixel discarded, final Z buffer equal to unculled rendering, HZ depths
// conservative, every mechanism exercised):
//   block sizes 8x8-4x4 and 32x32-16x16 (16x16-8x8 is the default, run by
//   the end-to-end test), the uncompressed entry format, HZ depth accuracy
//   of 6, 12 and 16 bits, bit-mask caches of 16, 32 and 128 blocks, and a
//   pixel test taking four pixels per cycle.
// It also checks the built HZ-buffer memory of each block configuration
// against the buffer sizes expected for 1280 x 1024 (in KB of 1000 bytes):
//   32x32-16x16: 5.44 / 3.2, 16x16-8x8: 21.76 / 12.8, 8x8-4x4: 87 / 51.2
// (uncompressed / compressed, 8-bit depths).
module tb_hz_configs;
  localparam int N = 11;
  logic done [N];
  int   chk [N], fail [N], bits [N];
  int   checks = 0, failures = 0;

  hz_scene_runner #(.L1S(2), .NAME("8x8-4x4")) r0 (.done_o(done[0]), .checks_o(chk[0]), .failures_o(fail[0]), .mem_bits_o(bits[0]));
  hz_scene_runner #(.L1S(4), .NAME("32x32-16x16")) r1 (.done_o(done[1]), .checks_o(chk[1]), .failures_o(fail[1]), .mem_bits_o(bits[1]));
  hz_scene_runner #(.COMPRESS(1'b0), .NAME("16x16-8x8 uncompressed")) r2 (.done_o(done[2]), .checks_o(chk[2]), .failures_o(fail[2]), .mem_bits_o(bits[2]));
  hz_scene_runner #(.DW(6), .NAME("6-bit depth")) r3 (.done_o(done[3]), .checks_o(chk[3]), .failures_o(fail[3]), .mem_bits_o(bits[3]));
  hz_scene_runner #(.DW(12), .NAME("12-bit depth")) r4 (.done_o(done[4]), .checks_o(chk[4]), .failures_o(fail[4]), .mem_bits_o(bits[4]));
  hz_scene_runner #(.DW(16), .NAME("16-bit depth")) r5 (.done_o(done[5]), .checks_o(chk[5]), .failures_o(fail[5]), .mem_bits_o(bits[5]));
  hz_scene_runner #(.CACHE(16), .NAME("16-block cache")) r6 (.done_o(done[6]), .checks_o(chk[6]), .failures_o(fail[6]), .mem_bits_o(bits[6]));
  hz_scene_runner #(.CACHE(32), .NAME("32-block cache")) r7 (.done_o(done[7]), .checks_o(chk[7]), .failures_o(fail[7]), .mem_bits_o(bits[7]));
  hz_scene_runner #(.CACHE(128), .NAME("128-block cache")) r8 (.done_o(done[8]), .checks_o(chk[8]), .failures_o(fail[8]), .mem_bits_o(bits[8]));
  hz_scene_runner #(.L1S(2), .COMPRESS(1'b0), .NAME("8x8-4x4 uncompressed")) r9 (.done_o(done[9]), .checks_o(chk[9]), .failures_o(fail[9]), .mem_bits_o(bits[9]));
  hz_scene_runner #(.LANES(4), .NAME("4 pixels per cycle")) r10 (.done_o(done[10]), .checks_o(chk[10]), .failures_o(fail[10]), .mem_bits_o(bits[10]));

  task automatic size_check(int i, real kb);
    real got;
    got = real'(bits[i]) / 8000.0;
    checks++;
    if (got < kb - 0.05 || got > kb + 0.05) begin
      failures++;
      $display("FAIL HZ buffer of run %0d is %0.2f KB, expected %0.2f KB", i, got, kb);
    end else $display("HZ buffer of run %0d: %0.2f KB", i, got);
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    all = 0;
    while (!all) begin
      #1000;
      all = 1;
      for (int i = 0; i < N; i++) if (!done[i]) all = 0;
    end
    size_check(0, 51.2);
    size_check(9, 87.0);
    size_check(1, 3.2);
    size_check(2, 21.76);
    size_check(6, 12.8);
    for (int i = 0; i < N; i++) begin checks += chk[i]; failures += fail[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
