// High-speed LUT multiplier: N x N-bit unsigned multiplication by look-up
// table and expandable adder (default 32 x 32 bits, 8-bit fractions).
//
// Both operands are split into K-bit fractions. Each clock one pair of
// fractions is looked up in a table of all K x K-bit products, the product is
// shifted to its bit position, and a 2N-bit ripple adder built from one-bit
// full adders adds it to the running sum. For 32-bit operands and K = 8 this
// is (32/8)^2 = 16 steps, one per clock.
//
// Structure: lut_mult_ctrl (state machine, step counter, fraction select,
// adder input registers) -> lut_rom (K x K product table) and
// expandable_adder (2N bits); the adder output is fed back to the controller.
//
// Interface and timing: clk, synchronous active-high rst, data_a, data_b
// (N bits) -> result (2N bits), t. The unit runs continuously from the
// release of reset: it samples data_a/data_b, spends N/K squared clocks
// accumulating and one clock finishing, and then shows the product on result
// with t = 1 for a single cycle (Q*Q + 2 = 18 clocks per product by default).
// Outside that cycle result is 0 and t is 0. state and step expose the
// sequencer for observation.
module lut_multiplier
  import lut_mult_pkg::*;
#(
  parameter int unsigned N = DEF_N,
  parameter int unsigned K = DEF_K
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [N-1:0]   data_a,
  input  logic [N-1:0]   data_b,
  output logic [2*N-1:0] result,
  output logic           t,
  output mult_state_e    state,
  output logic [$clog2(num_steps(N, K))-1:0] step
);

  logic [K-1:0]   s_data_a, s_data_b;
  logic [2*K-1:0] lut_result;
  logic [2*N-1:0] a_signal, b_signal, total_signal;
  logic           adder_cout;

  lut_mult_ctrl #(.N(N), .K(K)) u_ctrl (
    .clk         (clk),
    .rst         (rst),
    .data_a      (data_a),
    .data_b      (data_b),
    .s_data_a    (s_data_a),
    .s_data_b    (s_data_b),
    .lut_result  (lut_result),
    .a_signal    (a_signal),
    .b_signal    (b_signal),
    .total_signal(total_signal),
    .result      (result),
    .t           (t),
    .state       (state),
    .step        (step)
  );

  lut_rom #(.K(K)) u_lut (
    .a(s_data_a),
    .b(s_data_b),
    .p(lut_result)
  );

  // The product of two N-bit numbers fits in 2N bits, so the carry out of
  // the adder is always 0 and is left unused.
  expandable_adder #(.WIDTH(2*N)) u_adder (
    .a   (a_signal),
    .b   (b_signal),
    .cin (1'b0),
    .sum (total_signal),
    .cout(adder_cout)
  );

endmodule
