// Unit delay of the FIR delay line.
//
// A W-bit register that holds the previous sample: q takes the value of d on
// every rising clock edge and is cleared by the active-low asynchronous reset.
// The delay is one clock, i.e. one sample, since the filter takes a new sample
// on every clock. The reset and its polarity are choices of this design.
module roba_unit_delay #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
