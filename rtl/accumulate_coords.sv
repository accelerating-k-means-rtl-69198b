// Partial cluster update store (Accumulate_Coords).
//
// Keeps, for each of MAX_CLUSTERS clusters, the fp32 sum of the x and y
// coordinates of the points assigned to it and the number of such points.
// A high `acc_en` adds point `acc_p` to cluster `acc_idx` at the next rising
// edge (one fp32 adder per coordinate, read-modify-write in one cycle, so
// back-to-back updates of the same cluster are safe). `clear` zeroes every
// entry and takes priority. The read port returns the 16 clusters of vector
// chunk `rd_chunk` combinationally. Centroids are not moved here: as the
// reference design requires, the tile only accumulates, and the update of the
// centres is left to the data collector.
module accumulate_coords
  import kmeans_pkg::*;
#(
  parameter int unsigned MAX_CLUSTERS = 32,
  localparam int unsigned CHUNKS = (MAX_CLUSTERS + LANES - 1) / LANES,
  localparam int unsigned IDX_W  = $clog2(CHUNKS * LANES),
  localparam int unsigned CH_W   = (CHUNKS > 1) ? $clog2(CHUNKS) : 1
)(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  acc_en,
  input  logic [IDX_W-1:0]      acc_idx,
  input  point_t                acc_p,
  input  logic [CH_W-1:0]       rd_chunk,
  output vec_t                  rd_sum,
  output logic [LANES-1:0][31:0] rd_cnt
);

  point_t      sum_q [CHUNKS*LANES];
  logic [31:0] cnt_q [CHUNKS*LANES];

  point_t sel, nxt;
  assign sel = sum_q[acc_idx];

  fp32_add u_ax (.a(sel.x), .b(acc_p.x), .y(nxt.x));
  fp32_add u_ay (.a(sel.y), .b(acc_p.y), .y(nxt.y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < CHUNKS*LANES; k++) begin
        sum_q[k] <= '0;
        cnt_q[k] <= '0;
      end
    end else if (clear) begin
      for (int k = 0; k < CHUNKS*LANES; k++) begin
        sum_q[k] <= '0;
        cnt_q[k] <= '0;
      end
    end else if (acc_en) begin
      sum_q[acc_idx] <= nxt;
      cnt_q[acc_idx] <= cnt_q[acc_idx] + 32'd1;
    end
  end

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      rd_sum[l] = sum_q[int'(rd_chunk) * LANES + l];
      rd_cnt[l] = cnt_q[int'(rd_chunk) * LANES + l];
    end
  end

endmodule
