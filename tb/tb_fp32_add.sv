// Self-checking test of fp32_add against double-precision reference arithmetic:
// directed special cases (cancellation, signed zeros, infinities, NaN,
// overflow, far-apart exponents) and random operands of both signs, including
// close exponents so that subtraction cancels many leading bits.
module tb_fp32_add;
  import fp_ref_pkg::*;
  logic [31:0] a, b, y, e;
  int checks = 0, failures = 0;

  fp32_add dut (.a(a), .b(b), .y(y));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic [31:0] exp_y);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL add %h + %h = %h, expected %h", ta, tb_, y, exp_y);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3F80_0000, 32'h4000_0000, 32'h4040_0000);   // 1+2
    check(32'h3F80_0000, 32'hBF80_0000, 32'h0000_0000);   // 1-1
    check(32'h8000_0000, 32'h8000_0000, 32'h8000_0000);   // -0 + -0
    check(32'h0000_0000, 32'hC040_0000, 32'hC040_0000);   // 0 + -3
    check(32'h7F80_0000, 32'hFF80_0000, 32'h7FC0_0000);   // inf-inf
    check(32'hFF80_0000, 32'h3F80_0000, 32'hFF80_0000);   // -inf+1
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF, 32'h7F80_0000);   // overflow
    check(32'h4B80_0000, 32'h3F80_0000, 32'h4B80_0000);   // 2^24+1 ties to even
    check(32'h4B80_0000, 32'h4000_0000, 32'h4B80_0001);   // 2^24+2
    check(32'h3F80_0000, 32'h0080_0000, 32'h3F80_0000);   // tiny addend
    for (int i = 0; i < 20000; i++) begin
      a = rand_fp(40);
      e = (i % 2 == 0) ? rand_fp(40) : {~a[31], a[30:23], 23'($urandom)};
      check(a, e, ref_add(a, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
