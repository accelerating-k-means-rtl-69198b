// Vector Euclidean distance unit (Vect_Euclidean_Distance).
//
// Compares one two-dimensional point with a whole vector of cluster centres
// at once: LANES copies of the squared-distance lane, one per centre, so a
// point is measured against 16 centres in one clock. Strategy and width
// follow the reference design, which computes the distance of each point to all
// clusters in parallel on 1024-bit vectors of 16 fp32 coordinate pairs.
// Combinational; the result is valid in the same cycle as the inputs.
module vec_distance
  import kmeans_pkg::*;
#(
  parameter int unsigned LANES_P = LANES
)(
  input  point_t                   p,
  input  point_t [LANES_P-1:0]     c,
  output fp32_t  [LANES_P-1:0]     d
);

  for (genvar l = 0; l < LANES_P; l++) begin : g_lane
    sq_dist u_lane (.p(p), .c(c[l]), .d(d[l]));
  end

endmodule
