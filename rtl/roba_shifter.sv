// Shifter block of the RoBA multiplier.
//
// Multiplies a DW-bit unsigned value by a power of two given as a one-hot word,
// by shifting it left. The one-hot word is first encoded into a binary shift
// amount; a logarithmic barrel shifter then applies it in SW stages, stage s
// shifting by 2^s when bit s of the amount is set. A zero one-hot word gives a
// zero result. The multiplier uses three of these: Ar*B, Br*A and Ar*Br.
// Purely combinational. Results wider than OW bits are truncated (the
// multiplier works modulo 2^OW, see roba_multiplier).
//
// Ports: d - DW-bit data; pow - RW-bit one-hot power of two; y - OW-bit product.
module roba_shifter #(
  parameter int unsigned DW = 8,
  parameter int unsigned RW = 9,
  parameter int unsigned OW = 16
) (
  input  logic [DW-1:0] d,
  input  logic [RW-1:0] pow,
  output logic [OW-1:0] y
);

  localparam int unsigned SW = (RW > 1) ? $clog2(RW) : 1;

  logic [SW-1:0] amt;
  logic          nonzero;
  logic [OW-1:0] stage [SW+1];

  // One-hot to binary: bit s of the amount is the OR of all positions with bit s set.
  always_comb begin
    amt     = '0;
    nonzero = |pow;
    for (int i = 0; i < RW; i++) begin
      if (pow[i]) amt = amt | SW'(i);
    end
  end

  assign stage[0] = nonzero ? OW'(d) : '0;

  for (genvar s = 0; s < SW; s++) begin : g_stage
    assign stage[s+1] = amt[s] ? (stage[s] << (2 ** s)) : stage[s];
  end

  assign y = stage[SW];

endmodule
