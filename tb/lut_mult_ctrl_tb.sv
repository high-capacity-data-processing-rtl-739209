// Test of the multiplier sequencer on its own, with the product table and
// the adder replaced by plain behavioural expressions in this testbench.
//
// The operands are changed on every clock, so the test also shows that the
// sequencer multiplies the values it sampled in its first state. Checked:
//   - in every step the fraction pair on s_data_a/s_data_b is
//     A[j] and B[i] with j = step mod 4 and i = step div 4;
//   - one clock later a_signal holds that pair's product shifted left by
//     8*(i+j) bits;
//   - t rises 17 clock edges after the operand-sampling edge (one product
//     every 18 clocks), lasts one cycle, and result then equals A*B; at all
//     other times result is 0.
module lut_mult_ctrl_tb;
  import lut_mult_pkg::*;
  localparam int N = 32;
  localparam int K = 8;
  localparam int Q = N / K;

  logic           clk = 0, rst = 1;
  logic [N-1:0]   data_a, data_b;
  logic [K-1:0]   s_data_a, s_data_b;
  logic [2*K-1:0] lut_result;
  logic [2*N-1:0] a_signal, b_signal, total_signal, result;
  logic           t;
  mult_state_e    state;
  logic [3:0]     step;
  int checks = 0, failures = 0;

  lut_mult_ctrl #(.N(N), .K(K)) dut (.*);

  // Behavioural stand-ins for the table and the adder.
  assign lut_result   = (2*K)'(s_data_a) * (2*K)'(s_data_b);
  assign total_signal = a_signal + b_signal;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [N-1:0]   op_a, op_b;
  logic [2*N-1:0] exp_a_signal;
  bit             have_exp;
  int             cyc_since_sample;
  int             products;
  bit             t_prev;

  initial begin
    data_a = '0;
    data_b = '0;
    products = 0;
    have_exp = 0;
    cyc_since_sample = -1;
    t_prev = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    while (products < 40) begin
      // Values present at this posedge; the sequencer samples them in ST_SR.
      @(posedge clk);
      if (state == ST_SR) begin
        op_a = data_a;
        op_b = data_b;
        cyc_since_sample = 0;
      end else if (cyc_since_sample >= 0) begin
        cyc_since_sample++;
      end
      @(negedge clk);
      if (cyc_since_sample >= 0) begin
        if (have_exp) check(a_signal == exp_a_signal, "a_signal placement");
        have_exp = 0;
        if (state == ST_STEP) begin
          int j, i;
          j = int'(step) % Q;
          i = int'(step) / Q;
          check(s_data_a == op_a[j*K +: K], "fraction of A");
          check(s_data_b == op_b[i*K +: K], "fraction of B");
          exp_a_signal = ((2*N)'(s_data_a) * (2*N)'(s_data_b)) << (K * (i + j));
          have_exp = 1;
        end
        if (t) begin
          check(cyc_since_sample == Q * Q + 1, "t 17 clocks after the sampling edge");
          check(result == (2*N)'(op_a) * (2*N)'(op_b), "product");
          check(!t_prev, "t lasts one cycle");
          products++;
        end else begin
          check(result == '0, "result zero outside t");
        end
      end
      t_prev = t;
      // New random operands every cycle; some with zero fractions.
      data_a = $urandom;
      data_b = $urandom;
      if ($urandom_range(3) == 0) data_a[8*$urandom_range(3) +: 8] = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
