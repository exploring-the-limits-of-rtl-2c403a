// One multiply-accumulate lane: the model of one DSP block of a processing element.
//
// Each lane owns one matrix column. When en is high the lane adds a*b to its
// accumulator (acc <= acc + a*b), with the product rounded to single precision
// before the addition, as the FPGA DSP multiply-add mode does. clr sets the
// accumulator to +0 and wins over en. One multiply-accumulate is accepted per
// clock; acc shows the new value one clock after en.
// Interface: clk, rst_n (active-low, synchronous, clears acc), clr, en, a, b in;
// acc out.
module fp32_mac
  import sparse_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clr,
  input  logic  en,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t acc
);

  fp32_t prod, sum;

  fp32_mul u_mul (.a(a),   .b(b),    .y(prod));
  fp32_add u_add (.a(acc), .b(prod), .y(sum));

  always_ff @(posedge clk) begin
    if (!rst_n || clr) acc <= FP32_ZERO;
    else if (en)       acc <= sum;
  end

endmodule
