// fp32_mul: IEEE-754 single-precision multiplier, purely combinational.
//
// The 24x24-bit significand product is normalised by at most one place and
// rounded to nearest, ties to even. Subnormal operands count as zero and a
// result below the normal range is flushed to zero; a result above it
// becomes infinity. Any NaN operand, or infinity times zero, gives the quiet
// NaN 0x7FC00000. These simplifications are this design's choice: the
// network only needs normal numbers of moderate size.
//
// Interface: y = a * b, no clock, no latency.
module fp32_mul
  import ann_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        sa, sb, sy;
  logic [7:0]  ea, eb;
  logic [47:0] prod;
  logic [22:0] mant;
  logic        guard, sticky;
  logic [23:0] mant_r;       // rounded mantissa with carry bit
  logic signed [10:0] e;

  always_comb begin
    sa = a[31];
    sb = b[31];
    ea = a[30:23];
    eb = b[30:23];
    sy = sa ^ sb;
    prod = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = 11'(ea) + 11'(eb) - 11'sd127;
    if (prod[47]) begin
      mant   = prod[46:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      e      = e + 11'sd1;
    end else begin
      mant   = prod[45:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    mant_r = {1'b0, mant} + 24'(guard && (sticky || mant[0]));
    if (mant_r[23]) e = e + 11'sd1;

    if ((ea == 8'hFF && a[22:0] != '0) || (eb == 8'hFF && b[22:0] != '0) ||
        (ea == 8'hFF && eb == 8'd0) || (eb == 8'hFF && ea == 8'd0))
      y = 32'h7FC0_0000;
    else if (ea == 8'hFF || eb == 8'hFF)
      y = {sy, 8'hFF, 23'd0};
    else if (ea == 8'd0 || eb == 8'd0)
      y = {sy, 31'd0};
    else if (e >= 11'sd255)
      y = {sy, 8'hFF, 23'd0};
    else if (e <= 11'sd0)
      y = {sy, 31'd0};
    else
      y = {sy, e[7:0], mant_r[22:0]};
  end

endmodule
