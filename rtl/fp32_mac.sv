// fp32_mac: the arithmetic of one neuron step, y = c + a*b in single
// precision.
//
// The product is rounded before the addition (a multiply followed by an add,
// not a fused operation). The network core uses this one unit, time
// multiplexed, for every weighted sum (c = running sum, a = weight,
// b = neuron input) and every weight update (c = old weight, a = learning
// rate times delta, b = neuron input). Sharing a single unit is this
// design's choice.
//
// Interface: combinational, no clock, no latency.
module fp32_mac
  import ann_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  fp32_t c,
  output fp32_t y
);

  fp32_t prod;

  fp32_mul u_mul (.a(a), .b(b), .y(prod));
  fp32_add u_add (.a(c), .b(prod), .y(y));

endmodule
