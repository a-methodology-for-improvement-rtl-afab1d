// Rounding block of the RoBA multiplier.
//
// Rounds an unsigned magnitude to the nearest power of two and returns it as a
// one-hot word (zero stays zero). With the leading one of the input at bit k,
// the input lies between 2^k and 2^(k+1); it is rounded up to 2^(k+1) when
// bit k-1 is also set (the input is at or above the midpoint 3*2^(k-1)) and
// down to 2^k otherwise. Midpoints 3*2^p therefore round to the larger power,
// except 3*2^2 = 12, which rounds down to 8, as the description of the rounding
// rule states. The output is one bit wider than the input because rounding up
// can produce 2^W.
//
// Ports: x - W-bit unsigned magnitude; xr - (W+1)-bit one-hot rounded value.
// Purely combinational.
module roba_rounding #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  output logic [W:0]   xr
);

  logic [W-1:0] lead;   // one-hot leading one of x
  logic [W:0]   near;   // nearest power of two, before the 12 -> 8 exception

  // Leading-one detector: bit i is set when x[i] is set and no higher bit is.
  always_comb begin
    logic seen;
    seen = 1'b0;
    for (int i = W - 1; i >= 0; i--) begin
      lead[i] = x[i] & ~seen;
      seen    = seen | x[i];
    end
  end

  // Bit j of the result is set when the leading one sits at j and the next
  // lower bit is clear (round down), or when the leading one sits at j-1 and
  // the bit below it is set (round up).
  always_comb begin
    for (int j = 0; j <= W; j++) begin
      logic dn, up;
      dn = 1'b0;
      up = 1'b0;
      if (j == 0)     dn = lead[0];
      else if (j < W) dn = lead[j] & ~x[j-1];
      if (j >= 2)     up = lead[j-1] & x[j-2];
      near[j] = dn | up;
    end
  end

  // 12 = 3*2^2 rounds down to 8 rather than up to 16.
  assign xr = (W >= 4 && x == W'(12)) ? (W+1)'(8) : near;

endmodule
