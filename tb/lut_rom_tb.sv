// Exhaustive test of the 8x8-bit product table: all 2^16 input pairs,
// including the zero pairs that bypass the table, compared with a * b.
module lut_rom_tb;
  localparam int K = 8;
  logic [K-1:0]   a, b;
  logic [2*K-1:0] p;
  int checks = 0, failures = 0;
  int bypass = 0;

  lut_rom #(.K(K)) dut (.a(a), .b(b), .p(p));

  initial begin
    for (int x = 0; x < (1 << K); x++) begin
      for (int y = 0; y < (1 << K); y++) begin
        a = K'(x);
        b = K'(y);
        #1;
        checks++;
        if (x == 0 || y == 0) bypass++;
        if (p !== (2*K)'(x * y)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d -> %0d", x, y, p);
        end
      end
    end
    // Every zero-input pair (2*2^K - 1 of them) must have been exercised.
    checks++;
    if (bypass != 2 * (1 << K) - 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
