// Testbench of the rounding block: every 8-bit input, and random 14-bit inputs,
// against the nearest power of two computed by integer comparison.
module tb_roba_rounding;
  import roba_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  x8;
  logic [8:0]  r8;
  logic [13:0] x14;
  logic [14:0] r14;

  roba_rounding #(.W(8))  dut8  (.x(x8),  .xr(r8));
  roba_rounding #(.W(14)) dut14 (.x(x14), .xr(r14));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      x8 = 8'(i);
      #1;
      checks++;
      if (64'(r8) != ref_round(64'(i))) begin
        failures++;
        $display("FAIL W=8 x=%0d got %0d expected %0d", i, r8, ref_round(64'(i)));
      end
    end
    // Spot checks written out by hand.
    begin
      automatic int unsigned vin [8]  = '{0, 1, 3, 5, 6, 10, 12, 96};
      automatic int unsigned vexp [8] = '{0, 1, 4, 4, 8, 8, 8, 128};
      for (int i = 0; i < 8; i++) begin
        x8 = 8'(vin[i]);
        #1;
        checks++;
        if (int'(r8) != int'(vexp[i])) begin
          failures++;
          $display("FAIL spot x=%0d got %0d expected %0d", vin[i], r8, vexp[i]);
        end
      end
    end
    for (int i = 0; i < 2000; i++) begin
      x14 = 14'($urandom);
      #1;
      checks++;
      if (64'(r14) != ref_round(64'(x14))) begin
        failures++;
        $display("FAIL W=14 x=%0d got %0d expected %0d", x14, r14, ref_round(64'(x14)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
