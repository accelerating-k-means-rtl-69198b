// Lloyd K-Means accelerator: one data dispatcher, N_AIE compute tiles and one
// data collector, computing one iteration (assign every point to its nearest
// centre, then move every centre to the mean of its points).
//
//   memory --> data_dispatcher --+--> kmeans_tile[0] --+
//                                +--> kmeans_tile[1] --+--> data_collector --> memory
//                                +--> ...             --+
//                                +----- centres -------+
//
// The dispatcher broadcasts the centres to every tile and to the collector
// and deals the point vectors out round-robin; each tile assigns its points
// and keeps per-cluster partial sums; the collector adds the partial sums of
// all tiles, divides by the counts and writes the new centres. Centres are
// never moved while points are being assigned, which is what lets the tiles
// work independently.
//
// Host side: pulse `start` with the cluster count (1..MAX_CLUSTERS), the
// point count and three word addresses: the current centres (ceil(K/16)
// words), the points (ceil(N/16) words, 16 x/y fp32 pairs per 1024-bit word,
// x in the low half of each 64-bit lane) and the place for the new centres.
// `done` pulses once the new centres are written. Iterations are repeated by
// the host. N_AIE = 32 is the largest tile count evaluated (the tile count of
// current NPUs); MAX_CLUSTERS = 32 is the largest cluster count evaluated.
module kmeans_top
  import kmeans_pkg::*;
#(
  parameter int unsigned N_AIE        = 32,
  parameter int unsigned MAX_CLUSTERS = 32,
  parameter int unsigned ADDR_W       = 32,
  parameter int unsigned FIFO_DEPTH   = 8
)(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [31:0]        n_clusters,
  input  logic [31:0]        n_points,
  input  logic [ADDR_W-1:0]  clu_base,
  input  logic [ADDR_W-1:0]  pts_base,
  input  logic [ADDR_W-1:0]  res_base,
  output logic               busy,
  output logic               done,
  // memory read port (dispatcher)
  output logic               rd_req_valid,
  output logic [ADDR_W-1:0]  rd_req_addr,
  input  logic               rd_req_ready,
  input  logic               rd_rsp_valid,
  input  vec_t               rd_rsp_data,
  // memory write port (collector)
  output logic               wr_valid,
  output logic [ADDR_W-1:0]  wr_addr,
  output vec_t               wr_data,
  input  logic               wr_ready,
  // event flags, one clock per event, for monitoring
  output logic               ev_backpressure,  // a destination held a beat back
  output logic               ev_pad_vector,    // dispatcher queued a padding vector
  output logic               ev_pad_skip,      // a tile dropped a padded point
  output logic               ev_tile_stall,    // a tile input buffer was full
  output logic               ev_empty_cluster  // collector kept a centre with no points
);

  localparam int unsigned N_DST = N_AIE + 1;

  logic [N_DST-1:0] d_valid, d_ready;
  vec_t [N_DST-1:0] d_data;
  logic [N_AIE-1:0] r_valid, r_ready, r_last;
  vec_t [N_AIE-1:0] r_data;
  logic [N_AIE-1:0] t_pad_skip, t_in_stall;
  logic             disp_busy, coll_busy;
  logic             disp_stall, disp_pad_vec, coll_empty;

  data_dispatcher #(
    .N_AIE(N_AIE), .ADDR_W(ADDR_W), .FIFO_DEPTH(FIFO_DEPTH)
  ) u_disp (
    .clk, .rst_n,
    .start, .n_clusters, .n_points, .clu_base, .pts_base,
    .busy(disp_busy), .done(),
    .rd_req_valid, .rd_req_addr, .rd_req_ready, .rd_rsp_valid, .rd_rsp_data,
    .out_valid(d_valid), .out_data(d_data), .out_ready(d_ready),
    .stall(disp_stall), .pad_vec(disp_pad_vec)
  );

  for (genvar t = 0; t < N_AIE; t++) begin : g_tile
    vec_stream_if s_in  (.clk, .rst_n);
    vec_stream_if s_out (.clk, .rst_n);

    assign s_in.valid  = d_valid[t];
    assign s_in.data   = d_data[t];
    assign s_in.last   = 1'b0;
    assign d_ready[t]  = s_in.ready;

    assign r_valid[t]  = s_out.valid;
    assign r_data[t]   = s_out.data;
    assign r_last[t]   = s_out.last;
    assign s_out.ready = r_ready[t];

    kmeans_tile #(.MAX_CLUSTERS(MAX_CLUSTERS)) u_tile (
      .clk, .rst_n,
      .in_s    (s_in),
      .out_s   (s_out),
      .pad_skip(t_pad_skip[t]),
      .in_stall(t_in_stall[t])
    );
  end

  data_collector #(
    .N_AIE(N_AIE), .MAX_CLUSTERS(MAX_CLUSTERS), .ADDR_W(ADDR_W)
  ) u_coll (
    .clk, .rst_n,
    .ctl_valid(d_valid[N_AIE]), .ctl_data(d_data[N_AIE]), .ctl_ready(d_ready[N_AIE]),
    .res_valid(r_valid), .res_data(r_data), .res_last(r_last), .res_ready(r_ready),
    .res_base,
    .wr_valid, .wr_addr, .wr_data, .wr_ready,
    .busy(coll_busy), .done, .empty_cluster(coll_empty)
  );

  assign busy             = disp_busy | coll_busy;
  assign ev_backpressure  = disp_stall;
  assign ev_pad_vector    = disp_pad_vec;
  assign ev_pad_skip      = |t_pad_skip;
  assign ev_tile_stall    = |t_in_stall;
  assign ev_empty_cluster = coll_empty;

endmodule
