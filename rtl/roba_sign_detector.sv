// Sign detector of the RoBA multiplier.
//
// Looks at the most significant bit of each two's complement operand, produces
// the absolute value of each operand and the sign of their product (the XOR of
// the two sign bits). The absolute value is formed exactly, as ~X + 1 for a
// negative operand. Because -2^(W-1) has magnitude 2^(W-1), the magnitudes are
// W bits wide, read as unsigned. Purely combinational.
//
// Ports: a, b - W-bit two's complement operands; abs_a, abs_b - W-bit unsigned
// magnitudes; neg - 1 when exactly one operand is negative.
// A zero operand still reports the XOR of the sign bits; the sign-set stage then
// negates a zero magnitude, which is harmless for exact negation.
module roba_sign_detector #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] abs_a,
  output logic [W-1:0] abs_b,
  output logic         neg
);

  always_comb begin
    abs_a = a[W-1] ? (~a + W'(1)) : a;
    abs_b = b[W-1] ? (~b + W'(1)) : b;
    neg   = a[W-1] ^ b[W-1];
  end

endmodule
