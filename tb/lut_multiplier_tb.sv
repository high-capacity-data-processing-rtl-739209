// End-to-end test of the 32x32-bit LUT multiplier at its default sizes.
//
// A list of corner-case operand pairs (zero, one, all ones, single bits,
// operands with zero bytes) is followed by random pairs; each product is
// compared with A*B computed here. The unit runs back to back without being
// reset between products. Also checked: t comes 17 clock edges after the
// operand-sampling edge (one product every 18 clocks) and lasts one cycle,
// result is 0 outside that cycle, operands changed in the middle of a multiplication do not disturb it, and
// a reset in the middle of a multiplication restarts cleanly.
// The test counts how often each mechanism occurred and fails if one never
// did: the zero bypass of the table, a carry rippling across 16 or more
// adder bits, back-to-back products, an operand change during a
// multiplication, and a reset during a multiplication.
module lut_multiplier_tb;
  import lut_mult_pkg::*;
  localparam int N = DEF_N;
  localparam int K = DEF_K;
  localparam int STEPS = (N / K) * (N / K);
  localparam int LAT = STEPS + 2;

  logic           clk = 0, rst = 1;
  logic [N-1:0]   data_a = '0, data_b = '0;
  logic [2*N-1:0] result;
  logic           t;
  mult_state_e    state;
  logic [3:0]     step;
  int checks = 0, failures = 0;

  lut_multiplier dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Mechanism counters.
  int n_bypass = 0, n_long_carry = 0, n_back_to_back = 0;
  int n_midop_change = 0, n_midop_reset = 0;

  // Longest run of carries inside the adder in this cycle.
  function automatic int longest_run(logic [2*N-1:0] c);
    int run = 0, best = 0;
    for (int i = 0; i < 2*N; i++) begin
      run  = c[i] ? run + 1 : 0;
      best = (run > best) ? run : best;
    end
    return best;
  endfunction

  always @(negedge clk) if (!rst && state == ST_STEP) begin
    if (dut.u_lut.a == '0 || dut.u_lut.b == '0) n_bypass++;
    // carry into bit i is sum ^ a ^ b
    if (longest_run(dut.total_signal ^ dut.a_signal ^ dut.b_signal) >= 16) n_long_carry++;
  end

  // Operand queue: corner cases first, then random pairs.
  logic [N-1:0] qa [$], qb [$];

  logic [N-1:0] op_a, op_b;
  int  since_sample = -1;
  int  products = 0;
  bit  t_prev = 0;
  bit  did_reset_test = 0;
  bit  last_pending = 0;

  initial begin
    qa.push_back('0);            qb.push_back('1);
    qa.push_back('1);            qb.push_back('0);
    qa.push_back('1);            qb.push_back('1);
    qa.push_back(32'd1);         qb.push_back('1);
    qa.push_back(32'd1000);      qb.push_back(32'd1000);
    qa.push_back(32'd1000);      qb.push_back(32'd15360);
    qa.push_back(32'h8000_0000); qb.push_back(32'h8000_0000);
    qa.push_back(32'hff00_00ff); qb.push_back(32'h00ff_ff00);
    qa.push_back(32'h0001_0000); qb.push_back(32'h0000_0100);
    qa.push_back(32'hffff_ffff); qb.push_back(32'h0000_0002);
    for (int n = 0; n < 300; n++) begin
      logic [N-1:0] x, y;
      x = $urandom;
      y = $urandom;
      if (n % 3 == 0) x[K*$urandom_range(N/K-1) +: K] = '0;
      if (n % 5 == 0) y[K*$urandom_range(N/K-1) +: K] = '0;
      qa.push_back(x);
      qb.push_back(y);
    end

    repeat (3) @(posedge clk);
    @(negedge clk) begin
      rst    = 0;
      data_a = qa.pop_front();
      data_b = qb.pop_front();
    end

    forever begin
      @(posedge clk);
      if (!rst && state == ST_SR) begin
        op_a = data_a;
        op_b = data_b;
        since_sample = 0;
      end else if (since_sample >= 0) begin
        since_sample++;
      end
      @(negedge clk);
      if (t) begin
        check(since_sample == LAT - 1, "t 17 clocks after the sampling edge");
        check(result == (2*N)'(op_a) * (2*N)'(op_b), "product");
        check(!t_prev, "t lasts one cycle");
        if (result != (2*N)'(op_a) * (2*N)'(op_b))
          $display("  %h * %h -> %h", op_a, op_b, result);
        products++;
        if (products > 1) n_back_to_back++;
        if (last_pending) break;
      end else begin
        check(result == '0, "result zero outside t");
      end
      t_prev = t;

      // Next operands: presented while the current ones are being processed;
      // every fourth product also gets garbage applied mid-operation first.
      if (state == ST_STEP && step == 4'd5 && products % 4 == 1) begin
        data_a = $urandom;
        data_b = $urandom;
        n_midop_change++;
      end
      if (state == ST_LAST) begin
        if (qa.size() == 0) last_pending = 1;
        else begin
          data_a = qa.pop_front();
          data_b = qb.pop_front();
        end
      end

      // One reset in the middle of a multiplication after a few products.
      if (!did_reset_test && products == 7 && state == ST_STEP && step == 4'd9) begin
        did_reset_test = 1;
        rst = 1;
        @(negedge clk);
        check(!t && result == '0 && state == ST_SR, "reset clears the unit");
        rst = 0;
        since_sample = -1;
        n_midop_reset++;
      end
    end

    check(products == 310, "all products delivered");
    check(n_bypass > 0, "zero bypass exercised");
    check(n_long_carry > 0, "long carry exercised");
    check(n_back_to_back > 0, "back-to-back products");
    check(n_midop_change > 0, "operand change during a multiplication");
    check(n_midop_reset > 0, "reset during a multiplication");
    $display("products=%0d bypass=%0d long_carry=%0d back_to_back=%0d midop_change=%0d midop_reset=%0d",
             products, n_bypass, n_long_carry, n_back_to_back, n_midop_change, n_midop_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
