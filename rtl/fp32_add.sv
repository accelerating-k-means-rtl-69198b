// Combinational IEEE-754 single-precision adder (a + b).
//
// Used for the coordinate differences of the distance unit, the distance sum
// and the accumulation of partial cluster coordinates. The larger operand is
// aligned with the smaller one shifted right through three guard/round/sticky
// bits, the sum or difference is normalised and rounded to nearest-even.
// Subnormal inputs are read as zero and subnormal results are flushed to zero;
// an infinite operand passes through and inf - inf gives a quiet NaN. The
// reference design only says coordinates are 32-bit floating point: the rounding
// and the flush-to-zero policy are this design's choices.
module fp32_add
  import kmeans_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  always_comb begin
    logic        sa, sb, sl, ss;
    logic [7:0]  ea, eb, el, es;
    logic [23:0] ma, mb;
    logic [26:0] ml, msh;           // 1.23 mantissa + guard, round, sticky
    logic [27:0] sum;
    logic [7:0]  d;
    logic        sticky;
    logic [9:0]  e;                 // signed-safe working exponent
    logic [4:0]  lz;
    logic [24:0] rnd;
    logic        found;

    sa = a[31]; ea = a[30:23]; ma = (ea == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    sb = b[31]; eb = b[30:23]; mb = (eb == 8'd0) ? 24'd0 : {1'b1, b[22:0]};
    y  = FP32_ZERO;
    sum = '0; msh = '0; ml = '0; sticky = 1'b0; e = '0; lz = '0; rnd = '0;
    sl = 1'b0; ss = 1'b0; el = '0; es = '0; d = '0; found = 1'b0;

    if (ea == 8'hFF || eb == 8'hFF) begin
      if (ea == 8'hFF && eb == 8'hFF && sa != sb) y = 32'h7FC0_0000;
      else if (ea == 8'hFF)                       y = a;
      else                                        y = b;
    end else begin
      // order by magnitude
      if ({ea, ma} >= {eb, mb}) begin
        sl = sa; el = ea; ml = {ma, 3'b000}; ss = sb; es = eb; msh = {mb, 3'b000};
      end else begin
        sl = sb; el = eb; ml = {mb, 3'b000}; ss = sa; es = ea; msh = {ma, 3'b000};
      end
      if (ml[26] == 1'b0) begin
        y = FP32_ZERO;                       // both operands zero
      end else begin
        d = (es == 8'd0) ? 8'd27 : (el - es);
        if (d >= 8'd27) begin
          sticky = |msh;
          msh    = '0;
        end else begin
          sticky = 1'b0;
          for (int i = 0; i < 27; i++)
            if (i < int'(d) && msh[i]) sticky = 1'b1;
          msh = msh >> d;
        end
        msh[0] = msh[0] | sticky;
        e = {2'b00, el};
        if (sl == ss) begin
          sum = {1'b0, ml} + {1'b0, msh};
          if (sum[27]) begin
            sum = {1'b0, sum[27:2], sum[1] | sum[0]};
            e   = e + 10'd1;
          end
        end else begin
          sum = {1'b0, ml} - {1'b0, msh};
          // leading zeros above bit 26
          lz = 5'd0;
          found = 1'b0;
          for (int i = 26; i >= 0; i--) begin
            if (!found && sum[i]) found = 1'b1;
            else if (!found)      lz = lz + 5'd1;
          end
          sum = sum << lz;
          e   = e - {5'd0, lz};
        end
        if (sum[26:0] == 27'd0) begin
          y = FP32_ZERO;                     // exact cancellation gives +0
        end else begin
          // round to nearest, ties to even: guard = sum[2], sticky = sum[1:0]
          rnd = {1'b0, sum[26:3]};
          if (sum[2] && ((|sum[1:0]) || sum[3])) rnd = rnd + 25'd1;
          if (rnd[24]) begin
            rnd = rnd >> 1;
            e   = e + 10'd1;
          end
          if (e[9] || e == 10'd0)   y = {sl, 31'd0};                 // underflow
          else if (e >= 10'd255)    y = {sl, 8'hFF, 23'd0};          // overflow
          else                      y = {sl, e[7:0], rnd[22:0]};
        end
      end
    end
  end

endmodule
