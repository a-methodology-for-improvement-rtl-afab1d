// Testbench of the Kogge-Stone adder at the three widths its comparison uses,
// 16, 32 and 64 bits: random and corner operands with both carry-in values,
// sum and carry-out against integer addition.
module tb_roba_ksa;

  int checks = 0, failures = 0;

  logic [15:0] a16, b16, s16;
  logic [31:0] a32, b32, s32;
  logic [63:0] a64, b64, s64;
  logic        cin, c16, c32, c64;

  roba_ksa #(.W(16)) dut16 (.a(a16), .b(b16), .cin(cin), .s(s16), .cout(c16));
  roba_ksa #(.W(32)) dut32 (.a(a32), .b(b32), .cin(cin), .s(s32), .cout(c32));
  roba_ksa #(.W(64)) dut64 (.a(a64), .b(b64), .cin(cin), .s(s64), .cout(c64));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string tag, input logic [64:0] got, input logic [64:0] expv);
    checks++;
    if (got !== expv) begin
      failures++;
      $display("FAIL %s got %h expected %h", tag, got, expv);
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [64:0] e64;
      case (t)
        0: begin a64 = '1; b64 = '0; end
        1: begin a64 = '1; b64 = 64'd1; end
        2: begin a64 = '1; b64 = '1; end
        3: begin a64 = 64'h5555_5555_5555_5555; b64 = 64'haaaa_aaaa_aaaa_aaaa; end
        default: begin a64 = {$urandom, $urandom}; b64 = {$urandom, $urandom}; end
      endcase
      cin = 1'($urandom);
      if (t < 8) cin = t[2];
      a16 = a64[15:0]; b16 = b64[15:0];
      a32 = a64[31:0]; b32 = b64[31:0];
      #1;
      check("w16", {48'd0, c16, s16}, 65'(a16) + 65'(b16) + 65'(cin));
      check("w32", {32'd0, c32, s32}, 65'(a32) + 65'(b32) + 65'(cin));
      e64 = 65'(a64) + 65'(b64) + 65'(cin);
      check("w64", {c64, s64}, e64);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
