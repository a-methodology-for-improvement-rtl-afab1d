// Testbench of the sign detector: every pair of 8-bit two's complement
// operands, magnitudes and product sign against integer arithmetic.
module tb_roba_sign_detector;

  int checks = 0, failures = 0;

  logic [7:0] a, b, abs_a, abs_b;
  logic       neg;

  roba_sign_detector #(.W(8)) dut (.a(a), .b(b), .abs_a(abs_a), .abs_b(abs_b), .neg(neg));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -128; i < 128; i++) begin
      for (int j = -128; j < 128; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        checks++;
        if (int'(abs_a) != ((i < 0) ? -i : i) || int'(abs_b) != ((j < 0) ? -j : j)
            || neg != ((i < 0) != (j < 0))) begin
          failures++;
          $display("FAIL a=%0d b=%0d got |a|=%0d |b|=%0d neg=%0b", i, j, abs_a, abs_b, neg);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
