// End-to-end testbench of the four-tap RoBA FIR filter at its default sizes
// (8-bit samples and coefficients, 18-bit output).
//
// Drives one sample per clock and checks y in the same cycle against a model
// that keeps its own sample history and forms each product with the integer
// RoBA reference. Phases: reset; an impulse, whose response must be the
// coefficients themselves (rounding 1 to 1 makes those products exact);
// directed samples that hit the rounding cases; long random streams with
// changing coefficients; a reset in the middle of a stream. It counts how often
// each mechanism occurred in the multipliers (negative products, operands
// rounded up, rounded down, midpoints, the 12 -> 8 exception, zero operands)
// and in the filter (reset clearing the history, sums of mixed sign), and
// counts a failure for any that never occurred.
module tb_roba_fir;
  import roba_ref_pkg::*;

  localparam int N = 8, TAPS = 4, YW = 18;

  int checks = 0, failures = 0, cycles = 0;

  logic                   clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]           x;
  logic [TAPS-1:0][N-1:0] b;
  logic [YW-1:0]          y;

  int hist [TAPS];   // model history: hist[k] = x(n-1-k), signed

  typedef enum int {EV_NEG, EV_UP, EV_DOWN, EV_MID, EV_TWELVE, EV_ZERO, EV_RESET,
                    EV_MIXED, EV_COUNT} event_e;
  int events [EV_COUNT];
  string ev_name [EV_COUNT] = '{"negative product", "operand rounded up",
                                "operand rounded down", "midpoint operand",
                                "12 -> 8 rounding", "zero operand",
                                "reset cleared history", "mixed-sign sum"};

  roba_fir dut (.clk(clk), .rst_n(rst_n), .x(x), .b(b), .y(y));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int mag(input int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic void note_operand(input int v);
    longint unsigned m, r;
    m = longint'(mag(v));
    r = ref_round(m);
    if (m == 0)       events[EV_ZERO]++;
    else if (r > m)   events[EV_UP]++;
    else if (r < m)   events[EV_DOWN]++;
    if (m == 12)      events[EV_TWELVE]++;
    if (m >= 3 && ((m & (m - 1)) != 0) && (((m / 3) & ((m / 3) - 1)) == 0) && (m % 3 == 0))
      events[EV_MID]++;
  endfunction

  // Expected output for the sample now on x, with the model history.
  function automatic int expected_y();
    int sum = 0, pos = 0, negs = 0;
    for (int k = 0; k < TAPS; k++) begin
      int xs, bs;
      longint unsigned pw;
      int pv;
      xs = (k == 0) ? int'($signed(x)) : hist[k-1];
      bs = int'($signed(b[k]));
      pw = ref_mul(N, 0, longint'(xs), longint'(bs));
      pv = int'($signed(16'(pw)));
      note_operand(xs);
      note_operand(bs);
      if (pv < 0) begin events[EV_NEG]++; negs++; end
      if (pv > 0) pos++;
      sum += pv;
    end
    if (pos > 0 && negs > 0) events[EV_MIXED]++;
    return sum;
  endfunction

  task automatic apply(input int sample);
    int e;
    x = N'(sample);
    #1;
    e = expected_y();
    checks++;
    if (int'($signed(y)) != e) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d x=%0d got %0d expected %0d", cycles, sample, $signed(y), e);
    end
    @(posedge clk);
    for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = int'($signed(N'(sample)));
    #1;
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    #1;
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    // With the history cleared, a zero sample must give zero.
    x = '0;
    #1;
    checks++;
    if (y != '0) begin failures++; $display("FAIL y=%0d after reset", $signed(y)); end
    else events[EV_RESET]++;
    @(negedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
  endtask

  initial begin
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    x = '0;
    b = '0;
    repeat (2) @(posedge clk);
    #1;
    do_reset();

    // Impulse response: y must read b0, b1, b2, b3, then 0.
    b[0] = 8'sd23; b[1] = -8'sd7; b[2] = 8'sd100; b[3] = -8'sd128;
    begin
      automatic int imp_exp [5] = '{23, -7, 100, -128, 0};
      for (int t = 0; t < 5; t++) begin
        x = (t == 0) ? 8'd1 : 8'd0;
        #1;
        checks++;
        if (int'($signed(y)) != imp_exp[t]) begin
          failures++;
          $display("FAIL impulse t=%0d got %0d expected %0d", t, $signed(y), imp_exp[t]);
        end
        void'(expected_y());
        @(posedge clk);
        for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = int'($signed(x));
        #1;
      end
    end

    // Directed samples covering rounding up, down, midpoints and 12.
    b[0] = 8'sd10; b[1] = 8'sd5; b[2] = -8'sd12; b[3] = 8'sd96;
    begin
      automatic int dir [12] = '{10, 5, 12, -12, 3, 6, 24, -48, 127, -128, 0, 7};
      foreach (dir[i]) apply(dir[i]);
    end

    // Random streams with changing coefficients and a reset in the middle.
    for (int blk = 0; blk < 40; blk++) begin
      for (int k = 0; k < TAPS; k++) b[k] = N'($urandom);
      for (int t = 0; t < 250; t++) apply(int'($signed(N'($urandom))));
      if (blk == 20) do_reset();
    end

    for (int e = 0; e < EV_COUNT; e++) begin
      $display("%-24s %0d", ev_name[e], events[e]);
      checks++;
      if (events[e] == 0) begin
        failures++;
        $display("FAIL mechanism never exercised: %s", ev_name[e]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
