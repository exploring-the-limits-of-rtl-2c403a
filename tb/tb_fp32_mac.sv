// Self-checking test of one fp32_mac lane: random runs of multiply-accumulates
// with idle cycles between them, checked against a reference that rounds the
// product and then the sum to single precision; clr and reset are checked too.
module tb_fp32_mac;
  import fp_ref_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [31:0] a = 0, b = 0, acc, model;
  int checks = 0, failures = 0;

  fp32_mac dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .a(a), .b(b), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] exp_acc);
    checks++;
    if (acc !== exp_acc) begin
      failures++;
      if (failures < 10) $display("FAIL acc=%h expected %h", acc, exp_acc);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(32'd0);
    model = 0;
    for (int run = 0; run < 200; run++) begin
      clr = 1; #0;
      @(posedge clk); #1 clr = 0;
      model = 0;
      check(model);
      for (int i = 0; i < 40; i++) begin
        en = ($urandom_range(0, 3) != 0);
        a = rand_fp(10);
        b = rand_fp(10);
        if (en) model = ref_add(model, ref_mul(a, b));
        @(posedge clk); #1;
        check(model);
      end
      en = 0;
    end
    rst_n = 0;
    @(posedge clk); #1 rst_n = 1;
    check(32'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
