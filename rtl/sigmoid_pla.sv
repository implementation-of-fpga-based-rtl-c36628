// sigmoid_pla: logistic activation 1/(1+exp(-x)) of a single-precision value,
// approximated by piecewise-linear segments (the PLAN approximation).
//
// For z = |x|:
//   z >= 5          : f = 1
//   2.375 <= z < 5  : f = z/32 + 0.84375
//   1 <= z < 2.375  : f = z/8  + 0.625
//   z < 1           : f = z/4  + 0.5
// and the result is f for x >= 0, 1 - f for x < 0. The slopes are powers of
// two, so the multiply is a subtraction from the exponent field; one adder
// adds the offset and a second forms 1 - f. The worst-case error against the
// true logistic function is below 0.02. The document only calls the neuron
// function non-linear; the logistic curve and this approximation are this
// design's choice.
//
// Interface: y = sigmoid(x), combinational, no latency.
module sigmoid_pla
  import ann_pkg::*;
(
  input  fp32_t x,
  output fp32_t y
);

  localparam logic [30:0] MAG_5_0   = 31'h40A0_0000;
  localparam logic [30:0] MAG_2_375 = 31'h4018_0000;
  localparam logic [30:0] MAG_1_0   = 31'h3F80_0000;

  logic [30:0] z;
  logic [7:0]  shift;
  fp32_t       scaled, offset, f, one_minus_f;

  always_comb begin
    z = x[30:0];
    if (z >= MAG_2_375) begin
      shift  = 8'd5;
      offset = 32'h3F58_0000;   // 0.84375
    end else if (z >= MAG_1_0) begin
      shift  = 8'd3;
      offset = 32'h3F20_0000;   // 0.625
    end else begin
      shift  = 8'd2;
      offset = FP_HALF;
    end
    // z * 2^-shift; values too small for a normal number become zero.
    if (z[30:23] > shift) scaled = {1'b0, z[30:23] - shift, z[22:0]};
    else                  scaled = FP_ZERO;
  end

  fp32_add u_offset (.a(scaled), .b(offset), .y(f));
  fp32_add u_mirror (.a(FP_ONE), .b({1'b1, f[30:0]}), .y(one_minus_f));

  always_comb begin
    if (z >= MAG_5_0) y = x[31] ? FP_ZERO : FP_ONE;
    else              y = x[31] ? one_minus_f : f;
  end

endmodule
