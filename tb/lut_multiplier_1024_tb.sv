// 1024 x 1024-bit multiplication with 8-bit fractions: the large-operand
// case of the step-count table (128 fractions per operand, 16384 table
// steps per product), run on the same multiplier with N = 1024.
//
// Three products are computed back to back (random operands, all ones times
// all ones, and a random operand with zeroed fractions) and compared with the
// 2048-bit product computed here; the spacing of the done pulses must be
// (1024/8)^2 + 2 = 16386 clocks.
module lut_multiplier_1024_tb;
  import lut_mult_pkg::*;
  localparam int N = 1024;
  localparam int K = 8;
  localparam int STEPS = (N / K) * (N / K);

  logic           clk = 0, rst = 1;
  logic [N-1:0]   data_a, data_b;
  logic [2*N-1:0] result;
  logic           t;
  mult_state_e    state;
  logic [$clog2(STEPS)-1:0] step;
  int checks = 0, failures = 0;

  lut_multiplier #(.N(N), .K(K)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] rand_wide();
    logic [N-1:0] r;
    for (int i = 0; i < N / 32; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  logic [N-1:0] pa [3], pb [3];
  int  last_t = -1, cyc = 0;

  initial begin
    pa[0] = rand_wide();  pb[0] = rand_wide();
    pa[1] = '1;           pb[1] = '1;
    pa[2] = rand_wide();  pb[2] = rand_wide();
    for (int i = 0; i < N / K; i += 3) pa[2][i*K +: K] = '0;

    data_a = pa[0];
    data_b = pb[0];
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 3; n++) begin
      // wait for the done pulse of product n; load the next operands while
      // the unit is in its last state
      do begin
        @(negedge clk);
        cyc++;
        if (state == ST_LAST && n < 2) begin
          data_a = pa[n+1];
          data_b = pb[n+1];
        end
      end while (!t);
      checks++;
      if (result != (2*N)'(pa[n]) * (2*N)'(pb[n])) begin
        failures++;
        $display("FAIL product %0d", n);
      end
      if (last_t >= 0) begin
        checks++;
        if (cyc - last_t != STEPS + 2) begin
          failures++;
          $display("FAIL spacing %0d", cyc - last_t);
        end
      end
      last_t = cyc;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * (STEPS + 2) + 20) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
