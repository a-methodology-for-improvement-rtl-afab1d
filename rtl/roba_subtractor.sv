// Subtractor block of the RoBA multiplier.
//
// Computes x - y modulo 2^W as x + ~y + 1 on a Kogge-Stone adder, so it shares
// the adder structure used elsewhere in the multiplier. In the multiplier x is
// Ar*B + Br*A and y is Ar*Br, and the difference is the magnitude of the
// approximate product. Purely combinational.
//
// Ports: x, y - W-bit operands; d - W-bit difference.
// Building the subtractor from the prefix adder is a choice of this design; the
// description of the multiplier only names the block.
module roba_subtractor #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] d
);

  logic unused_cout;

  roba_ksa #(.W(W)) u_ksa (
    .a   (x),
    .b   (~y),
    .cin (1'b1),
    .s   (d),
    .cout(unused_cout)
  );

endmodule
