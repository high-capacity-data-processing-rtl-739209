// Test of the expandable adder at its default 64-bit width and at 1024 bits.
//
// Random and corner-case operands (all ones plus one, long carry chains,
// zero) are applied; the sum and carry-out are compared with the built-in
// (WIDTH+1)-bit addition. The result must settle without any clock, i.e.
// within one cycle of the operands changing.
module expandable_adder_tb;
  localparam int W0 = 64;
  localparam int W1 = 1024;

  logic [W0-1:0] a0, b0, s0;
  logic          c0, co0;
  logic [W1-1:0] a1, b1, s1;
  logic          c1, co1;
  int checks = 0, failures = 0;

  expandable_adder dut0 (.a(a0), .b(b0), .cin(c0), .sum(s0), .cout(co0));
  expandable_adder #(.WIDTH(W1)) dut1 (.a(a1), .b(b1), .cin(c1), .sum(s1), .cout(co1));

  function automatic logic [W1-1:0] rand_wide();
    logic [W1-1:0] r;
    for (int i = 0; i < W1 / 32; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  task automatic check0(input logic [W0-1:0] x, input logic [W0-1:0] y, input logic ci);
    logic [W0:0] exp;
    a0 = x; b0 = y; c0 = ci;
    #1;
    exp = {1'b0, x} + {1'b0, y} + (W0+1)'(ci);
    checks++;
    if ({co0, s0} !== exp) begin
      failures++;
      $display("FAIL W=%0d a=%h b=%h cin=%0d got %h exp %h", W0, x, y, ci, {co0, s0}, exp);
    end
  endtask

  task automatic check1(input logic [W1-1:0] x, input logic [W1-1:0] y, input logic ci);
    logic [W1:0] exp;
    a1 = x; b1 = y; c1 = ci;
    #1;
    exp = {1'b0, x} + {1'b0, y} + (W1+1)'(ci);
    checks++;
    if ({co1, s1} !== exp) begin
      failures++;
      $display("FAIL W=%0d sum mismatch (cin=%0d)", W1, ci);
    end
  endtask

  initial begin
    check0('0, '0, 1'b0);
    check0('1, 64'd1, 1'b0);                 // carry ripples through all bits
    check0('1, '0, 1'b1);
    check0('1, '1, 1'b1);
    check0(64'h5555_5555_5555_5555, 64'haaaa_aaaa_aaaa_aaaa, 1'b1);
    for (int n = 0; n < 2000; n++)
      check0({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));

    check1('1, W1'(1), 1'b0);
    check1('0, '0, 1'b0);
    check1('1, '1, 1'b1);
    for (int n = 0; n < 200; n++)
      check1(rand_wide(), rand_wide(), 1'($urandom));

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
