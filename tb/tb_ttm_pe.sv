// Self-checking testbench of the TTM processing element in both of its
// configurations: matrix rows loaded from global memory for every nonzero,
// and the whole matrix copied on chip first. See ttm_env for the checks.
module tb_ttm_pe;
  int   checks_g, failures_g, checks_o, failures_o, checks, failures;
  logic fin_g, fin_o;

  ttm_env #(.COLS(4), .ONCHIP(1'b0)) env_global (.checks(checks_g), .failures(failures_g), .finished(fin_g));
  ttm_env #(.COLS(4), .ONCHIP(1'b1)) env_onchip (.checks(checks_o), .failures(failures_o), .finished(fin_o));

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks_g + checks_o, failures_g + failures_o + 1);
    $finish;
  end

  initial begin
    wait (fin_g && fin_o);
    checks   = checks_g + checks_o;
    failures = failures_g + failures_o;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
