// Kogge-Stone parallel-prefix adder.
//
// Adds two W-bit words and a carry-in. Bitwise generate g = a & b and
// propagate p = a ^ b are combined by the prefix operator
//   (g, p) o (g', p') = (g | p & g', p & p')
// in ceil(log2 W) levels, level l joining each bit with the bit 2^l below it,
// so every bit sees its full group generate after log2 W operator delays and
// the adder uses about W*log2 W operators. The carry-in enters as the generate
// of a position below bit 0. Sum bit i is p[i] ^ carry into bit i.
// Purely combinational.
//
// Ports: a, b - W-bit addends; cin - carry in; s - W-bit sum; cout - carry out.
module roba_ksa #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  // Position 0 of the prefix network is the carry-in, positions 1..W the bits.
  localparam int unsigned N = W + 1;
  localparam int unsigned L = $clog2(N);

  logic [N-1:0] g [L+1];
  logic [N-1:0] p [L+1];
  logic [W-1:0] hp;          // half-sum a ^ b

  assign hp      = a ^ b;
  assign g[0]    = {a & b, cin};
  assign p[0]    = {hp, 1'b0};

  for (genvar l = 0; l < L; l++) begin : g_level
    for (genvar i = 0; i < N; i++) begin : g_bit
      if (i >= (2 ** l)) begin : g_op
        assign g[l+1][i] = g[l][i] | (p[l][i] & g[l][i - (2 ** l)]);
        assign p[l+1][i] = p[l][i] & p[l][i - (2 ** l)];
      end else begin : g_pass
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  // g[L][i] is the carry into bit i (group generate of the carry-in and bits 0..i-1).
  assign s    = hp ^ g[L][W-1:0];
  assign cout = g[L][W];

endmodule
