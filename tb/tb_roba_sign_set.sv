// Testbench of the sign-set block, exact (~X + 1) and inversion-only (~X)
// negation, against integer negation.
module tb_roba_sign_set;

  int checks = 0, failures = 0;

  logic [15:0] x, y_exact, y_approx;
  logic        neg;

  roba_sign_set #(.W(16), .EXACT(1'b1)) dut_exact  (.x(x), .neg(neg), .y(y_exact));
  roba_sign_set #(.W(16), .EXACT(1'b0)) dut_approx (.x(x), .neg(neg), .y(y_approx));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int signed ex, ea;
      x   = (t < 2) ? 16'(t * 48) : 16'($urandom_range(0, 16384));
      neg = (t < 4) ? t[0] : 1'($urandom);
      ex  = neg ? -int'(x) : int'(x);
      ea  = neg ? -int'(x) - 1 : int'(x);
      #1;
      checks += 2;
      if (y_exact !== 16'(ex)) begin
        failures++;
        $display("FAIL exact x=%0d neg=%0b got %h", x, neg, y_exact);
      end
      if (y_approx !== 16'(ea)) begin
        failures++;
        $display("FAIL approx x=%0d neg=%0b got %h", x, neg, y_approx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
