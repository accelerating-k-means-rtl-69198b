// Shared types and constants of the vectorized K-Means accelerator.
//
// Every stream beat is one 1024-bit vector. A vector holds 16 two-dimensional
// points (or cluster centres); each coordinate is an IEEE-754 single-precision
// number, x in the low half of a lane and y in the high half. The same
// 1024-bit beat also carries the "data information" header that precedes the
// clusters and points of one tile, and the partial results of a tile.
// The vector width, the fp32 coordinate format and the 16 elements per vector
// follow the reference design; the header layout is this design's choice.
package kmeans_pkg;

  localparam int unsigned VEC_BITS = 1024;          // one AIE vector register
  localparam int unsigned COORD_W  = 32;            // fp32 coordinate
  localparam int unsigned DIMS     = 2;             // two-dimensional points
  localparam int unsigned LANES    = VEC_BITS / (COORD_W * DIMS);  // = 16

  typedef logic [31:0] fp32_t;

  // One point or centre: x in bits [31:0], y in bits [63:32].
  typedef struct packed {
    fp32_t y;
    fp32_t x;
  } point_t;

  typedef point_t [LANES-1:0] vec_t;                 // 1024 bits

  // Data information beat sent ahead of the clusters of each tile.
  // n_vectors: point vectors the tile will receive (padding included).
  // n_pad:     padded (invalid) points at the end of those vectors.
  typedef struct packed {
    logic [VEC_BITS-97:0] rsvd;
    logic [31:0]          n_pad;
    logic [31:0]          n_vectors;
    logic [31:0]          n_clusters;
  } header_t;

  // Partial-result beat holding per-cluster point counts (lane l in bits
  // [32*l+31 : 32*l]); the upper half is unused.
  typedef struct packed {
    logic [VEC_BITS/2-1:0]        rsvd;
    logic [LANES-1:0][31:0]       cnt;
  } count_vec_t;

  localparam fp32_t FP32_ZERO = 32'h0000_0000;

  // Sign flip: turns an fp32 value into its negation.
  function automatic fp32_t fp32_neg(fp32_t a);
    return {~a[31], a[30:0]};
  endfunction

  // Ordering of non-negative fp32 values is the ordering of their bit
  // patterns read as unsigned integers. Squared distances are never negative.
  function automatic logic fp32_pos_lt(fp32_t a, fp32_t b);
    return a < b;
  endfunction

endpackage
