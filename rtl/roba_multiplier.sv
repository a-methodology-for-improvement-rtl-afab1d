// Rounding-based approximate (RoBA) multiplier with a Kogge-Stone adder.
//
// Each operand is rounded to its nearest power of two, Ar and Br. Since
//   A*B = (Ar-A)*(Br-B) + Ar*B + Br*A - Ar*Br
// and the first term is usually small, it is dropped and the product is
// approximated by Ar*B + Br*A - Ar*Br. With Ar and Br powers of two, all three
// remaining products are shifts. The datapath is:
//   sign detector -> two rounding blocks -> three barrel shifters (Ar*B, Br*A,
//   Ar*Br) -> Kogge-Stone adder (Ar*B + Br*A) -> subtractor (- Ar*Br)
//   -> sign set.
// The sign detector makes both operands non-negative and records the product
// sign, the core works on magnitudes, and the sign set applies the sign at the
// end. In the unsigned variant both sign stages are left out.
//
// All internal words are 2N bits wide and the arithmetic is modulo 2^(2N). The
// intermediate sum Ar*B + Br*A can exceed 2N bits in the unsigned variant, but
// the final magnitude never does (it is at most Ar*Br <= 2^(2N-2) for signed
// and below 2^(2N) for unsigned operands), so wrap-around in the adder cancels
// in the subtractor.
//
// Ports: a, b - N-bit operands (two's complement, or unsigned for
// ROBA_UNSIGNED); p - 2N-bit approximate product. Purely combinational, no
// clock: the result is valid one combinational delay after the operands.
//
// The datapath blocks, the use of a Kogge-Stone adder and the three variants
// follow the description of the multiplier. Widths of the internal words, the
// one-hot form of the rounded values and the modulo-2^(2N) arithmetic are
// choices of this design.
module roba_multiplier
  import roba_pkg::*;
#(
  parameter int unsigned   N       = 8,
  parameter roba_variant_e VARIANT = ROBA_SIGNED
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned PW = 2 * N;

  logic [N-1:0]  abs_a, abs_b;   // operand magnitudes
  logic          neg;            // product is negative
  logic [N:0]    ar, br;         // one-hot rounded magnitudes
  logic [PW-1:0] ar_b, br_a, ar_br;
  logic [PW-1:0] sum, mag;
  logic          unused_cout;

  if (VARIANT == ROBA_UNSIGNED) begin : g_unsigned
    assign abs_a = a;
    assign abs_b = b;
    assign neg   = 1'b0;
    assign p     = mag;
  end else begin : g_signed
    roba_sign_detector #(.W(N)) u_sign_det (
      .a    (a),
      .b    (b),
      .abs_a(abs_a),
      .abs_b(abs_b),
      .neg  (neg)
    );

    roba_sign_set #(.W(PW), .EXACT(VARIANT == ROBA_SIGNED)) u_sign_set (
      .x  (mag),
      .neg(neg),
      .y  (p)
    );
  end

  roba_rounding #(.W(N)) u_round_a (.x(abs_a), .xr(ar));
  roba_rounding #(.W(N)) u_round_b (.x(abs_b), .xr(br));

  roba_shifter #(.DW(N),   .RW(N+1), .OW(PW)) u_shift_arb  (.d(abs_b), .pow(ar), .y(ar_b));
  roba_shifter #(.DW(N),   .RW(N+1), .OW(PW)) u_shift_bra  (.d(abs_a), .pow(br), .y(br_a));
  roba_shifter #(.DW(N+1), .RW(N+1), .OW(PW)) u_shift_arbr (.d(br),    .pow(ar), .y(ar_br));

  roba_ksa #(.W(PW)) u_adder (
    .a   (ar_b),
    .b   (br_a),
    .cin (1'b0),
    .s   (sum),
    .cout(unused_cout)
  );

  roba_subtractor #(.W(PW)) u_sub (
    .x(sum),
    .y(ar_br),
    .d(mag)
  );

endmodule
