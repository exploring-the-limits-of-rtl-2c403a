// Single-precision floating-point adder (combinational).
//
// Computes y = a + b for IEEE-754 binary32 operands with round-to-nearest-even.
// The operands are ordered by magnitude, the smaller significand is aligned
// to the larger with its shifted-out bits kept as a sticky bit, the two are
// added or subtracted, and the result is normalised (one step right, or left
// by the leading-zero count) before rounding. Subnormal inputs read as zero and
// subnormal results flush to zero, like the FPGA DSP floating-point blocks.
// An exact zero sum is +0 except (-0)+(-0). NaN and infinity follow IEEE rules.
// Interface: a, b in; y out; no clock, the result is valid in the same cycle.
module fp32_add
  import sparse_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  // Significand layout in a 51-bit word: bit 50 carry, bit 49 hidden one,
  // bits 48:26 fraction, bits 25:0 guard and sticky room.
  localparam int unsigned W = 51;

  fp32_t       op_hi, op_lo;
  logic [7:0]  e_big, e_small;
  logic [W-1:0] m_big, m_small, m_shift, m_sum;
  logic [W-2:0] m_norm;
  logic [7:0]  d;
  logic        sticky_al;
  logic        a_inf, b_inf, a_nan, b_nan, a_zero, b_zero, sub;
  int unsigned lz;
  logic signed [10:0] exp_v;
  logic [23:0] mant;
  logic        guard, sticky, round_up;
  logic [24:0] mant_rnd;

  always_comb begin
    a_nan  = (a[30:23] == 8'hFF) && (a[22:0] != 23'd0);
    b_nan  = (b[30:23] == 8'hFF) && (b[22:0] != 23'd0);
    a_inf  = (a[30:23] == 8'hFF) && (a[22:0] == 23'd0);
    b_inf  = (b[30:23] == 8'hFF) && (b[22:0] == 23'd0);
    a_zero = (a[30:23] == 8'd0);
    b_zero = (b[30:23] == 8'd0);

    if (a[30:0] >= b[30:0]) begin
      op_hi = a; op_lo = b;
    end else begin
      op_hi = b; op_lo = a;
    end
    e_big   = op_hi[30:23];
    e_small = op_lo[30:23];
    sub     = op_hi[31] ^ op_lo[31];
    m_big   = {2'b01, op_hi[22:0], 26'd0};
    m_small = {2'b01, op_lo[22:0], 26'd0};
    d       = e_big - e_small;

    // Align the smaller operand, folding shifted-out bits into bit 0.
    if (d >= 8'(W)) begin
      m_shift   = '0;
      sticky_al = 1'b1;
    end else begin
      m_shift   = m_small >> d;
      sticky_al = |(m_small & ((W'(1) << d) - W'(1)));
    end
    m_shift[0] = m_shift[0] | sticky_al;

    m_sum = sub ? (m_big - m_shift) : (m_big + m_shift);

    // Normalise so that the hidden one sits at bit 49.
    lz = 0;
    for (int i = W - 2; i >= 0; i--) begin
      if (m_sum[i]) begin
        lz = (W - 2) - i;
        break;
      end
    end
    exp_v = 11'(signed'({3'b000, e_big}));
    if (m_sum[W-1]) begin
      m_norm = m_sum[W-1:1] | (W-1)'(m_sum[0]);
      exp_v  = exp_v + 11'sd1;
    end else begin
      m_norm = m_sum[W-2:0] << lz;
      exp_v  = exp_v - 11'(lz);
    end

    mant     = m_norm[49:26];
    guard    = m_norm[25];
    sticky   = |m_norm[24:0];
    round_up = guard && (sticky || mant[0]);
    mant_rnd = {1'b0, mant} + {24'd0, round_up};
    if (mant_rnd[24]) begin
      exp_v    = exp_v + 11'sd1;
      mant_rnd = mant_rnd >> 1;
    end

    if (a_nan || b_nan || (a_inf && b_inf && (a[31] != b[31]))) begin
      y = FP32_QNAN;
    end else if (a_inf) begin
      y = a;
    end else if (b_inf) begin
      y = b;
    end else if (a_zero && b_zero) begin
      y = {a[31] & b[31], 31'd0};
    end else if (a_zero) begin
      y = b;
    end else if (b_zero) begin
      y = a;
    end else if (m_sum == '0) begin
      y = FP32_ZERO;
    end else if (exp_v >= 11'sd255) begin
      y = {op_hi[31], 31'h7F80_0000};
    end else if (exp_v <= 11'sd0) begin
      y = {op_hi[31], 31'd0};
    end else begin
      y = {op_hi[31], exp_v[7:0], mant_rnd[22:0]};
    end
  end

endmodule
