// Look-up table ROM: the product of two K-bit unsigned fractions.
//
// The table holds every product a*b with both a and b non-zero, so it has
// (2^K - 1)^2 entries of 2K bits instead of 2^(2K): when either input is zero
// the table is bypassed and zero is sent straight to the output, which is the
// space saving the design describes. The table is indexed directly by the two
// fractions (rows and columns 1 .. 2^K-1), so no address arithmetic is needed.
// Entry [x][y] holds x*y; it is filled once at start-up, row by row, by
// repeated addition (entry [x][y] = entry [x][y-1] + x).
//
// The read is combinational: the product appears in the same clock cycle as
// the fractions. With the default K = 8 the table has 65025 16-bit words.
//
// Ports: a, b (K bits) -> p (2K bits).
module lut_rom #(
  parameter int unsigned K = 8
) (
  input  logic [K-1:0]   a,
  input  logic [K-1:0]   b,
  output logic [2*K-1:0] p
);

  localparam int unsigned MAXV = (1 << K) - 1;

  logic [2*K-1:0] rom [1:MAXV][1:MAXV];

  initial begin
    for (int unsigned x = 1; x <= MAXV; x++) begin
      logic [2*K-1:0] acc;
      acc = '0;
      for (int unsigned y = 1; y <= MAXV; y++) begin
        acc         = acc + (2*K)'(x);
        rom[x][y]   = acc;
      end
    end
  end

  always_comb begin
    if (a == '0 || b == '0) p = '0;
    else                    p = rom[a][b];
  end

endmodule
