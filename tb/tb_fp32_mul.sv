// Self-checking test of fp32_mul against double-precision reference arithmetic:
// directed special cases (zeros, infinities, NaN, overflow, underflow, exact
// halfway rounding) and random normal operands.
module tb_fp32_mul;
  import fp_ref_pkg::*;
  logic [31:0] a, b, y, e;
  int checks = 0, failures = 0;

  fp32_mul dut (.a(a), .b(b), .y(y));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic [31:0] exp_y);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL mul %h * %h = %h, expected %h", ta, tb_, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3F80_0000, 32'h4000_0000, 32'h4000_0000);   // 1*2
    check(32'hC040_0000, 32'h4040_0000, 32'hC110_0000);   // -3*3
    check(32'h0000_0000, 32'h4040_0000, 32'h0000_0000);   // 0*3
    check(32'h8000_0000, 32'h4040_0000, 32'h8000_0000);   // -0*3
    check(32'h7F80_0000, 32'h4040_0000, 32'h7F80_0000);   // inf*3
    check(32'h7F80_0000, 32'h0000_0000, 32'h7FC0_0000);   // inf*0
    check(32'h7FC0_0001, 32'h3F80_0000, 32'h7FC0_0000);   // NaN
    check(32'h7F00_0000, 32'h4000_0000, 32'h7F80_0000);   // overflow
    check(32'h0100_0000, 32'h0100_0000, 32'h0000_0000);   // underflow
    check(32'h3F80_0001, 32'h3F80_0001, 32'h3F80_0002);   // rounding
    for (int i = 0; i < 20000; i++) begin
      e = rand_fp(60);
      a = rand_fp(60);
      check(a, e, ref_mul(a, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
