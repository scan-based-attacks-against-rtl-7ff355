// Squarer over GF(2^M), combinational: out = a^2 mod f.
//
// Squaring in a polynomial basis spreads the bits (bit i moves to bit 2i,
// zeros in between); the 2M-1 bit result is then reduced from the top down
// with z^j = z^(j-M) * POLY_LOW for j >= M. All of it is fixed wiring and
// XOR gates.
module gf2m_sqr #(
  parameter int           M        = 163,
  parameter logic [M-1:0] POLY_LOW = M'('hC9)
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] out
);
  logic [2*M-2:0] s;

  always_comb begin
    s = '0;
    for (int i = 0; i < M; i++) s[2*i] = a[i];
    for (int j = 2 * M - 2; j >= M; j--)
      if (s[j]) begin
        s[j] = 1'b0;
        s ^= (2*M-1)'(POLY_LOW) << (j - M);
      end
    out = s[M-1:0];
  end
endmodule
