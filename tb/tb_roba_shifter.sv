// Testbench of the barrel shifter: random data shifted by every one-hot power,
// and by a zero power, against the product computed by multiplication.
module tb_roba_shifter;

  int checks = 0, failures = 0;

  logic [7:0]  d;
  logic [8:0]  pow;
  logic [15:0] y;

  roba_shifter #(.DW(8), .RW(9), .OW(16)) dut (.d(d), .pow(pow), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      d = (t == 0) ? 8'hff : 8'($urandom);
      for (int i = -1; i < 9; i++) begin
        longint unsigned expv;
        pow  = (i < 0) ? '0 : 9'(1 << i);
        expv = (i < 0) ? 0 : ((64'(d) * (64'd1 << i)) & 64'hffff);
        #1;
        checks++;
        if (64'(y) != expv) begin
          failures++;
          $display("FAIL d=%0d pow=%b got %0d expected %0d", d, pow, y, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
