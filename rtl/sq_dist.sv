// One lane of the vector distance unit: squared Euclidean distance
// (px - cx)^2 + (py - cy)^2 between a point and a cluster centre, in fp32.
//
// Purely combinational: two subtractions, two multiplications and one
// addition. The square root is left out because the nearest centre is the
// same for the distance and its square; this is this design's choice.
module sq_dist
  import kmeans_pkg::*;
(
  input  point_t p,
  input  point_t c,
  output fp32_t  d
);

  fp32_t dx, dy, dx2, dy2;

  fp32_add u_dx  (.a(p.x), .b(fp32_neg(c.x)), .y(dx));
  fp32_add u_dy  (.a(p.y), .b(fp32_neg(c.y)), .y(dy));
  fp32_mul u_dx2 (.a(dx), .b(dx), .y(dx2));
  fp32_mul u_dy2 (.a(dy), .b(dy), .y(dy2));
  fp32_add u_sum (.a(dx2), .b(dy2), .y(d));

endmodule
