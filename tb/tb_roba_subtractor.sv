// Testbench of the subtractor: random and corner 16-bit operands, the
// difference against integer subtraction modulo 2^16.
module tb_roba_subtractor;

  int checks = 0, failures = 0;

  logic [15:0] x, y, d, e;

  roba_subtractor #(.W(16)) dut (.x(x), .y(y), .d(d));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      case (t)
        0: begin x = 16'd0;    y = 16'd0; end
        1: begin x = 16'd0;    y = 16'd1; end
        2: begin x = 16'd80;   y = 16'd32; end
        3: begin x = 16'hffff; y = 16'hffff; end
        default: begin x = 16'($urandom); y = 16'($urandom); end
      endcase
      e = x - y;
      #1;
      checks++;
      if (d !== e) begin
        failures++;
        $display("FAIL %0d - %0d got %0d expected %0d", x, y, d, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
