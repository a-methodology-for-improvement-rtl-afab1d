// Sign-set block of the RoBA multiplier.
//
// Applies the product sign to the unsigned result. When neg is set the result is
// negated in two's complement: exactly as ~X + 1 when EXACT is 1 (S-RoBA), or
// approximately as ~X when EXACT is 0 (AS-RoBA), which saves the incrementer
// and makes a negative result one too small. Otherwise the result passes
// unchanged. Purely combinational.
//
// Ports: x - W-bit unsigned magnitude; neg - product is negative; y - W-bit
// signed result.
module roba_sign_set #(
  parameter int unsigned W     = 16,
  parameter bit          EXACT = 1'b1
) (
  input  logic [W-1:0] x,
  input  logic         neg,
  output logic [W-1:0] y
);

  always_comb begin
    if (!neg)      y = x;
    else if (EXACT) y = ~x + W'(1);
    else           y = ~x;
  end

endmodule
