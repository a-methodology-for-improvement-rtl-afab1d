// Testbench of the RoBA multiplier: every pair of 8-bit operands for the three
// variants (exact signed, signed with inversion-only negation, unsigned),
// against the integer reference model; the operand pair 10 x 5 of the 8-bit
// simulation; and random pairs at 12 bits. It also reports the mean relative
// error of the signed variant against the exact product.
module tb_roba_multiplier;
  import roba_pkg::*;
  import roba_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  a, b;
  logic [15:0] p_s, p_as, p_u;
  logic [11:0] a12, b12;
  logic [23:0] p12;
  real         rel_sum = 0.0;
  int          rel_n = 0;

  roba_multiplier dut_s (.a(a), .b(b), .p(p_s));
  roba_multiplier #(.N(8),  .VARIANT(ROBA_APPROX_SIGNED)) dut_as (.a(a), .b(b), .p(p_as));
  roba_multiplier #(.N(8),  .VARIANT(ROBA_UNSIGNED))      dut_u  (.a(a), .b(b), .p(p_u));
  roba_multiplier #(.N(12), .VARIANT(ROBA_SIGNED))        dut12  (.a(a12), .b(b12), .p(p12));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string tag, input longint unsigned got, input longint unsigned expv);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%h b=%h got %h expected %h", tag, a, b, got, expv);
    end
  endtask

  initial begin
    // 10 x 5: 10 rounds to 8, 5 to 4, so 8*5 + 4*10 - 8*4 = 48 (exact 50).
    a = 8'd10; b = 8'd5;
    #1;
    check("10x5", 64'(p_s), 64'd48);
    a = -8'sd10; b = 8'd5;
    #1;
    check("-10x5", 64'(p_s), 64'h0000_0000_0000_ffd0);
    check("-10x5 approx", 64'(p_as), 64'h0000_0000_0000_ffcf);

    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        check("S-RoBA",  64'(p_s),  ref_mul(8, 0, 64'(i), 64'(j)));
        check("AS-RoBA", 64'(p_as), ref_mul(8, 1, 64'(i), 64'(j)));
        check("U-RoBA",  64'(p_u),  ref_mul(8, 2, 64'(i), 64'(j)));
        if (i != 0 && j != 0) begin
          real ex;
          ex = real'($signed(a)) * real'($signed(b));
          rel_sum += ((real'($signed(p_s)) - ex) < 0 ? (ex - real'($signed(p_s))) : (real'($signed(p_s)) - ex)) / ((ex < 0) ? -ex : ex);
          rel_n++;
        end
      end
    end
    for (int t = 0; t < 5000; t++) begin
      a12 = 12'($urandom);
      b12 = 12'($urandom);
      #1;
      check("N=12", 64'(p12), ref_mul(12, 0, 64'(a12), 64'(b12)));
    end
    $display("mean relative error of the signed 8-bit variant: %f %%", 100.0 * rel_sum / rel_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
