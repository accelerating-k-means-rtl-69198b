// Combinational conversion of an unsigned 32-bit count to fp32.
//
// The data collector divides coordinate sums by the number of points in a
// cluster; this turns that count into a floating-point divisor. The leading
// one is found, the value is shifted to a 24-bit mantissa and rounded to
// nearest-even. Zero converts to +0.
module u32_to_fp32
  import kmeans_pkg::*;
(
  input  logic [31:0] u,
  output fp32_t       y
);

  always_comb begin
    int          msb;
    logic [31:0] sh;
    logic [24:0] rnd;
    logic        g, st;
    logic [7:0]  e;

    msb = 0;
    for (int i = 0; i < 32; i++)
      if (u[i]) msb = i;
    sh  = u << (31 - msb);          // leading one at bit 31
    rnd = {1'b0, sh[31:8]};
    g   = sh[7];
    st  = |sh[6:0];
    if (g && (st || rnd[0])) rnd = rnd + 25'd1;
    e = 8'(127 + msb);
    if (rnd[24]) begin
      rnd = rnd >> 1;
      e   = e + 8'd1;
    end
    y = (u == 32'd0) ? FP32_ZERO : {1'b0, e, rnd[22:0]};
  end

endmodule
