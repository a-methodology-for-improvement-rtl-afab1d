// Four-tap FIR filter built from RoBA approximate multipliers.
//
// Direct form:  y(n) = b0*x(n) + b1*x(n-1) + b2*x(n-2) + b3*x(n-3),
// with every product formed by a RoBA multiplier (see roba_multiplier), so the
// output is an approximation of the exact filter. A chain of TAPS-1 unit-delay
// registers holds the past samples; the products are summed by a chain of
// Kogge-Stone adders, first b0*x(n) + b1*x(n-1), then each later product added
// to the running sum, the last adder giving y(n).
//
// Timing: the filter takes one sample per clock. y is combinational from x and
// the delay line, so y(n) for the sample on x is valid in the same cycle; on the
// rising edge x moves into the delay line. Reset (active low, asynchronous)
// clears the delay line, so the filter starts from zero history.
//
// Ports: clk, rst_n; x - N-bit two's complement sample; b - TAPS coefficients,
// N-bit two's complement, b[k] weighting x(n-k); y - (2N + clog2(TAPS))-bit
// two's complement output, wide enough that the sum cannot overflow.
//
// The tap count, the delay line, the multipliers on every tap and the adder
// chain follow the filter structure described for this system; the sample and
// coefficient width of 8 bits follows the 8-bit multiplier simulated with it.
// Taking the coefficients as ports, the output width, the reset and using the
// Kogge-Stone adder for the filter's adders are choices of this design.
module roba_fir
  import roba_pkg::*;
#(
  parameter int unsigned   N       = 8,
  parameter int unsigned   TAPS    = 4,
  parameter roba_variant_e VARIANT = ROBA_SIGNED
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [N-1:0]                   x,
  input  logic [TAPS-1:0][N-1:0]         b,
  output logic [2*N+$clog2(TAPS)-1:0]    y
);

  localparam int unsigned PW = 2 * N;
  localparam int unsigned YW = PW + $clog2(TAPS);

  logic [N-1:0]  xd   [TAPS];   // xd[k] = x(n-k)
  logic [PW-1:0] prod [TAPS];
  logic [YW-1:0] acc  [TAPS];   // acc[k] = sum of products 0..k
  logic          unused_cout [TAPS];

  assign xd[0] = x;

  for (genvar k = 1; k < TAPS; k++) begin : g_delay
    roba_unit_delay #(.W(N)) u_delay (
      .clk  (clk),
      .rst_n(rst_n),
      .d    (xd[k-1]),
      .q    (xd[k])
    );
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    roba_multiplier #(.N(N), .VARIANT(VARIANT)) u_mult (
      .a(xd[k]),
      .b(b[k]),
      .p(prod[k])
    );
  end

  // Products are sign-extended to the output width, or zero-extended for the
  // unsigned variant.
  function automatic logic [YW-1:0] widen(input logic [PW-1:0] v);
    if (VARIANT == ROBA_UNSIGNED) return YW'(v);
    return {{(YW-PW){v[PW-1]}}, v};
  endfunction

  assign acc[0] = widen(prod[0]);
  assign unused_cout[0] = 1'b0;

  for (genvar k = 1; k < TAPS; k++) begin : g_add
    roba_ksa #(.W(YW)) u_adder (
      .a   (acc[k-1]),
      .b   (widen(prod[k])),
      .cin (1'b0),
      .s   (acc[k]),
      .cout(unused_cout[k])
    );
  end

  assign y = acc[TAPS-1];

endmodule
