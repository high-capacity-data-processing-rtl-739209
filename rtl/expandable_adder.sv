// Expandable adder: WIDTH one-bit full adders connected in a chain.
//
// The adder is grown to any width simply by instantiating more full-adder
// cells, each taking the carry of the cell below. It is purely combinational,
// so a sum is available within the clock cycle in which its inputs are
// registered; in the multiplier it adds the placed LUT product (a) to the
// running sum (b). The default width, 64 bits, is the product width of the
// 32x32-bit multiplier. The ripple-chain structure follows the design; the
// carry-in and carry-out pins are this implementation's own addition so that
// adders can be cascaded.
//
// Ports: a, b (WIDTH bits), cin -> sum (WIDTH bits), cout.
module expandable_adder #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  // carry[i] is the carry into bit i; carry[WIDTH] leaves the adder.
  logic carry [WIDTH+1];

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .s   (sum[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];

endmodule
