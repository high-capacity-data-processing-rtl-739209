// One-bit full adder: the cell from which the expandable adder is built.
//
// s    = a ^ b ^ cin
// cout = majority(a, b, cin)
// Purely combinational, no clock. The gate equations are the textbook ones;
// only the use of a 1-bit full adder as the building block is given by the
// design.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end

endmodule
