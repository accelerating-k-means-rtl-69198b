// Combinational IEEE-754 single-precision multiplier (a * b).
//
// Squares the coordinate differences in the distance unit. The 24x24-bit
// mantissa product is normalised by at most one place and rounded to
// nearest-even. Subnormal inputs are read as zero and subnormal results are
// flushed to zero; infinity times zero gives a quiet NaN. Rounding and the
// flush-to-zero policy are this design's choices.
module fp32_mul
  import kmeans_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  always_comb begin
    logic        s;
    logic [7:0]  ea, eb;
    logic [47:0] p;
    logic [9:0]  e;
    logic [24:0] rnd;
    logic        g, st;

    s  = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    p = '0; e = '0; rnd = '0; g = 1'b0; st = 1'b0;
    y = {s, 31'd0};
    if (ea == 8'hFF || eb == 8'hFF) begin
      if (ea == 8'd0 || eb == 8'd0) y = 32'h7FC0_0000;
      else                          y = {s, 8'hFF, 23'd0};
    end else if (ea == 8'd0 || eb == 8'd0) begin
      y = {s, 31'd0};
    end else begin
      p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
      e = {2'b00, ea} + {2'b00, eb} - 10'd127;
      if (p[47]) begin
        rnd = {1'b0, p[47:24]};
        g   = p[23];
        st  = |p[22:0];
        e   = e + 10'd1;
      end else begin
        rnd = {1'b0, p[46:23]};
        g   = p[22];
        st  = |p[21:0];
      end
      if (g && (st || rnd[0])) rnd = rnd + 25'd1;
      if (rnd[24]) begin
        rnd = rnd >> 1;
        e   = e + 10'd1;
      end
      if (e[9] || e == 10'd0)  y = {s, 31'd0};
      else if (e >= 10'd255)   y = {s, 8'hFF, 23'd0};
      else                     y = {s, e[7:0], rnd[22:0]};
    end
  end

endmodule
