// One step of a digit-serial, most-significant-digit-first multiplier over
// GF(2^M), combinational:  acc_out = acc * z^D + a * digit  (mod f).
//
// f(z) = z^M + POLY_LOW. The unreduced value has M + D bits; the D bits at
// z^M .. z^(M+D-1) are folded back in one pass (z^(M+j) = z^j * POLY_LOW),
// which is exact as long as deg(POLY_LOW) + D <= M. A full product a*b takes
// ceil(M/D) steps, feeding b's digits from the top. The digit-serial
// structure and the digit size are this design's choices; the document only
// says the circuit has a multiplier over GF(2^m).
module gf2m_mul_step #(
  parameter int             M        = 163,
  parameter int             D        = 13,
  parameter logic [M-1:0]   POLY_LOW = M'('hC9)
) (
  input  logic [M-1:0] acc,
  input  logic [M-1:0] a,
  input  logic [D-1:0] digit,
  output logic [M-1:0] acc_out
);
  logic [M+D-1:0] t;

  always_comb begin
    t = {acc, D'(0)};
    for (int j = 0; j < D; j++)
      if (digit[j]) t ^= (M+D)'(a) << j;
    acc_out = t[M-1:0];
    for (int j = 0; j < D; j++)
      if (t[M+j]) acc_out ^= POLY_LOW << j;
  end
endmodule
