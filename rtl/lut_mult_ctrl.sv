// Sequencer of the LUT multiplier: splits the operands into fractions, steps
// through every fraction pair and drives the adder.
//
// Operands data_a and data_b (N bits, unsigned) are cut into Q = N/K
// fractions of K bits. Step ta (0 .. Q*Q-1) multiplies fraction j = ta mod Q
// of A by fraction i = ta div Q of B in the look-up table; the product is
// placed at bit K*(i+j) of a 2N-bit word (a_signal) and added by the external
// adder to the running sum (b_signal). The adder output (total_signal) is fed
// back into b_signal every step.
//
// Timing (registered outputs, synchronous active-high reset):
//   ST_SR   1 cycle   operands sampled, fraction pair 0 put on s_data_a/b,
//                     a_signal, b_signal and result cleared
//   ST_STEP Q*Q cycles at step ta the table output for pair ta is placed in
//                     a_signal, pair ta+1 goes to the table, b_signal takes
//                     the sum of everything placed before
//   ST_LAST 1 cycle   result <= total_signal (all Q*Q products), t <= 1
// then back to ST_SR, so the unit multiplies continuously: one product every
// Q*Q + 2 clocks (18 for 32-bit operands with K = 8). The result and t are
// valid for exactly one cycle, the cycle after ST_LAST; otherwise both are 0.
//
// Follows the design: the sr/Sta/Sta(max) state sequence, the register names
// and placement, the step counter, the one-cycle done flag t and the zeroed
// result outside it. This implementation's own choices: the operands are
// sampled once in ST_SR and held for the whole multiplication (the inputs may
// change while it runs); B's fraction index is ta div Q; the placed product
// is 2K bits wide.
//
// Ports: clk, rst; data_a, data_b (N); s_data_a, s_data_b (K) to the table,
// lut_result (2K) from it; a_signal, b_signal (2N) to the adder, total_signal
// (2N) from it; result (2N), t; state and step for observation.
module lut_mult_ctrl
  import lut_mult_pkg::*;
#(
  parameter int unsigned N = DEF_N,
  parameter int unsigned K = DEF_K
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [N-1:0]         data_a,
  input  logic [N-1:0]         data_b,
  output logic [K-1:0]         s_data_a,
  output logic [K-1:0]         s_data_b,
  input  logic [2*K-1:0]       lut_result,
  output logic [2*N-1:0]       a_signal,
  output logic [2*N-1:0]       b_signal,
  input  logic [2*N-1:0]       total_signal,
  output logic [2*N-1:0]       result,
  output logic                 t,
  output mult_state_e          state,
  output logic [$clog2(num_steps(N, K))-1:0] step
);

  localparam int unsigned Q     = N / K;
  localparam int unsigned STEPS = num_steps(N, K);
  localparam int unsigned SW    = $clog2(STEPS);

  logic [N-1:0] op_a, op_b;

  // Fraction indices of a step: j selects from A, i from B.
  function automatic int unsigned frac_j(int unsigned ta);
    return ta % Q;
  endfunction

  function automatic int unsigned frac_i(int unsigned ta);
    return ta / Q;
  endfunction

  // K-bit fraction number idx of an N-bit word.
  function automatic logic [K-1:0] fraction(logic [N-1:0] w, int unsigned idx);
    return w[idx*K +: K];
  endfunction

  // Step that follows the current one (used to load the next fraction pair).
  logic [SW-1:0] next_step;
  assign next_step = (int'(step) == STEPS - 1) ? '0 : step + 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= ST_SR;
      step     <= '0;
      op_a     <= '0;
      op_b     <= '0;
      s_data_a <= '0;
      s_data_b <= '0;
      a_signal <= '0;
      b_signal <= '0;
      result   <= '0;
      t        <= 1'b0;
    end else begin
      unique case (state)
        ST_SR: begin
          op_a     <= data_a;
          op_b     <= data_b;
          s_data_a <= data_a[K-1:0];
          s_data_b <= data_b[K-1:0];
          a_signal <= '0;
          b_signal <= '0;
          result   <= '0;
          t        <= 1'b0;
          step     <= '0;
          state    <= ST_STEP;
        end
        ST_STEP: begin
          a_signal <= (2*N)'(lut_result) << (K * (frac_i(32'(step)) + frac_j(32'(step))));
          b_signal <= total_signal;
          s_data_a <= fraction(op_a, frac_j(32'(next_step)));
          s_data_b <= fraction(op_b, frac_i(32'(next_step)));
          result   <= '0;
          t        <= 1'b0;
          step     <= next_step;
          if (int'(step) == STEPS - 1) state <= ST_LAST;
        end
        ST_LAST: begin
          result   <= total_signal;
          t        <= 1'b1;
          a_signal <= '0;
          b_signal <= '0;
          s_data_a <= '0;
          s_data_b <= '0;
          step     <= '0;
          state    <= ST_SR;
        end
        default: begin
          a_signal <= '0;
          b_signal <= '0;
          s_data_a <= '0;
          s_data_b <= '0;
          result   <= '0;
          t        <= 1'b0;
          step     <= '0;
          state    <= ST_SR;
        end
      endcase
    end
  end

  // The operand width must be a whole number of fractions.
  initial assert (N % K == 0 && Q >= 1)
    else $fatal(1, "lut_mult_ctrl: N must be a multiple of K");

  // The done flag lasts one cycle and only a valid result is shown.
  assert property (@(posedge clk) disable iff (rst) t |=> !t);
  assert property (@(posedge clk) disable iff (rst) !t |-> result == '0);

endmodule
