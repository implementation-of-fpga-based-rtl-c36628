// bp_delta: back-propagation error term of a logistic neuron,
// delta = err * (y * (1 - y)), in single precision.
//
// y is the neuron's output and err its error: target - y for an output
// neuron, or the weighted sum of the next layer's deltas for a hidden neuron.
// y*(1-y) is the derivative of the logistic function written in terms of its
// output; it is used even though the forward pass applies a piecewise-linear
// approximation of that function (this design's choice, the usual practice).
// Operation order, each rounded: t = 1 - y, p = y * t, delta = err * p.
//
// Interface: combinational, no clock, no latency.
module bp_delta
  import ann_pkg::*;
(
  input  fp32_t y,
  input  fp32_t err,
  output fp32_t delta
);

  fp32_t one_minus_y, slope;

  fp32_add u_sub  (.a(FP_ONE), .b({~y[31], y[30:0]}), .y(one_minus_y));
  fp32_mul u_der  (.a(y), .b(one_minus_y), .y(slope));
  fp32_mul u_err  (.a(err), .b(slope), .y(delta));

endmodule
