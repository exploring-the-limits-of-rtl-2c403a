// Single-precision floating-point multiplier (combinational).
//
// Computes y = a * b for IEEE-754 binary32 operands with round-to-nearest-even.
// The 24x24-bit significand product is normalised by at most one position,
// then rounded using a guard bit and a sticky bit. Subnormal inputs are read
// as zero and subnormal results are flushed to signed zero, as the FPGA DSP
// floating-point blocks do. NaN and infinity follow IEEE rules (inf*0 = NaN).
// The processing elements use this as the multiplier half of a DSP lane.
// Interface: a, b in; y out; no clock, the result is valid in the same cycle.
module fp32_mul
  import sparse_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        sa, sb, sy;
  logic [7:0]  ea, eb;
  logic [22:0] fa, fb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [47:0] prod;
  logic [23:0] mant;
  logic        guard, sticky, round_up;
  logic [24:0] mant_rnd;
  logic signed [10:0] exp_v;

  always_comb begin
    sa = a[31]; ea = a[30:23]; fa = a[22:0];
    sb = b[31]; eb = b[30:23]; fb = b[22:0];
    sy = sa ^ sb;
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (fa == 23'd0);
    b_inf  = (eb == 8'hFF) && (fb == 23'd0);
    a_nan  = (ea == 8'hFF) && (fa != 23'd0);
    b_nan  = (eb == 8'hFF) && (fb != 23'd0);

    prod = {1'b1, fa} * {1'b1, fb};
    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      exp_v  = 11'(signed'({3'b000, ea})) + 11'(signed'({3'b000, eb})) - 11'sd126;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
      exp_v  = 11'(signed'({3'b000, ea})) + 11'(signed'({3'b000, eb})) - 11'sd127;
    end
    round_up = guard && (sticky || mant[0]);
    mant_rnd = {1'b0, mant} + {24'd0, round_up};
    if (mant_rnd[24]) begin
      exp_v    = exp_v + 11'sd1;
      mant_rnd = mant_rnd >> 1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      y = FP32_QNAN;
    end else if (a_inf || b_inf) begin
      y = {sy, 31'h7F80_0000};
    end else if (a_zero || b_zero) begin
      y = {sy, 31'd0};
    end else if (exp_v >= 11'sd255) begin
      y = {sy, 31'h7F80_0000};
    end else if (exp_v <= 11'sd0) begin
      y = {sy, 31'd0};
    end else begin
      y = {sy, exp_v[7:0], mant_rnd[22:0]};
    end
  end

endmodule
