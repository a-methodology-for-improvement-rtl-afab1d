// Testbench of the unit delay: q must equal d of the previous clock, and be
// zero after reset, including a reset in the middle of a random sequence.
module tb_roba_unit_delay;

  int checks = 0, failures = 0;
  int cycles = 0;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] d, q, prev;

  roba_unit_delay #(.W(8)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 8'h5a;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== 8'h00) begin failures++; $display("FAIL q=%h during reset", q); end
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      prev = d;
      @(posedge clk);
      #1;
      checks++;
      if (q !== prev) begin failures++; $display("FAIL t=%0d q=%h expected %h", t, q, prev); end
      d = 8'($urandom);
      if (t == 250) begin
        rst_n = 1'b0;
        #1;
        checks++;
        if (q !== 8'h00) begin failures++; $display("FAIL q=%h after async reset", q); end
        @(negedge clk);
        rst_n = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
