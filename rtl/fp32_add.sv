// fp32_add: IEEE-754 single-precision adder, purely combinational.
//
// The operands are ordered by magnitude, the smaller significand is shifted
// right into a 51-bit working field (24 significand bits plus 26 extra bits
// and a carry bit), added or subtracted, normalised with a leading-one search
// and rounded to nearest, ties to even. A shift larger than the extra bits
// keeps the smaller operand only as a sticky bit, which gives the same
// rounding as an exact sum. Subnormals count as zero and are flushed on
// output; overflow gives infinity; x - x gives +0. NaN inputs and
// inf - inf give the quiet NaN 0x7FC00000. These simplifications are this
// design's choice.
//
// Interface: y = a + b, no clock, no latency.
module fp32_add
  import ann_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  fp32_t       larger, lesser;
  logic [7:0]  eb, es;
  logic [7:0]  d;
  logic [50:0] mb, ms, s, sn;
  logic [5:0]  p;
  logic        found;
  logic        guard, sticky;
  logic [23:0] mant_r;
  logic signed [10:0] e;
  logic        a_nan, b_nan, a_inf, b_inf;

  always_comb begin
    a_nan = a[30:23] == 8'hFF && a[22:0] != '0;
    b_nan = b[30:23] == 8'hFF && b[22:0] != '0;
    a_inf = a[30:23] == 8'hFF && a[22:0] == '0;
    b_inf = b[30:23] == 8'hFF && b[22:0] == '0;

    // Order by magnitude; a zero exponent means the value is zero.
    if (a[30:0] >= b[30:0]) begin
      larger = a; lesser = b;
    end else begin
      larger = b; lesser = a;
    end
    eb = larger[30:23];
    es = lesser[30:23];
    d  = eb - es;
    mb = {1'b0, 1'b1, larger[22:0], 26'd0};
    if (es == 8'd0)
      ms = '0;
    else if (d > 8'd26)
      ms = 51'd1;                       // only a sticky contribution remains
    else
      ms = {1'b0, 1'b1, lesser[22:0], 26'd0} >> d;

    if (larger[31] == lesser[31]) s = mb + ms;
    else                      s = mb - ms;

    // Leading-one position.
    p = '0;
    found = 1'b0;
    for (int i = 50; i >= 0; i--) begin
      if (!found && s[i]) begin
        p = 6'(i);
        found = 1'b1;
      end
    end
    sn     = s << (6'd50 - p);
    e      = 11'(eb) + 11'(p) - 11'sd49;
    guard  = sn[26];
    sticky = |sn[25:0];
    mant_r = {1'b0, sn[49:27]} + 24'(guard && (sticky || sn[27]));
    if (mant_r[23]) e = e + 11'sd1;

    if (a_nan || b_nan || (a_inf && b_inf && a[31] != b[31]))
      y = 32'h7FC0_0000;
    else if (a_inf)
      y = a;
    else if (b_inf)
      y = b;
    else if (eb == 8'd0)
      y = (a[31] && b[31]) ? 32'h8000_0000 : 32'h0000_0000;  // both zero
    else if (s == '0)
      y = 32'h0000_0000;
    else if (e >= 11'sd255)
      y = {larger[31], 8'hFF, 23'd0};
    else if (e <= 11'sd0)
      y = {larger[31], 31'd0};
    else
      y = {larger[31], e[7:0], mant_r[22:0]};
  end

endmodule
