// Data collector: combines the partial cluster updates of all compute tiles
// into the new cluster centres and writes them to memory.
//
// It first takes, from the dispatcher, the data-information beat (cluster
// count) and the vectors of the current centres. It then drains the result
// blocks of tiles 0, 1, ..., N_AIE-1 in that order: per chunk of 16 clusters a
// beat of fp32 coordinate sums, added lane by lane into running totals (16
// adders per coordinate), and a beat of point counts, added as integers. Once
// all tiles are in, every cluster that received points gets the mean of its
// points, sum / count, from two sequential fp32 dividers (x and y, 30 clocks
// per cluster); a cluster that received none keeps its current centre. The
// new centres are written as ceil(K/16) 1024-bit words at res_base,
// res_base+1, ...; lanes past the last cluster are zero. `done` pulses when
// the last word has been accepted.
//
// That partial updates are summed here and only here, after every point has
// been assigned, follows the reference design. The fixed tile order, the
// division by a converted count and the rule for empty clusters are this
// design's choices.
module data_collector
  import kmeans_pkg::*;
#(
  parameter int unsigned N_AIE        = 32,
  parameter int unsigned MAX_CLUSTERS = 32,
  parameter int unsigned ADDR_W       = 32
)(
  input  logic               clk,
  input  logic               rst_n,
  // data information and current centres, from the dispatcher
  input  logic               ctl_valid,
  input  vec_t               ctl_data,
  output logic               ctl_ready,
  // partial results of the tiles
  input  logic [N_AIE-1:0]   res_valid,
  input  vec_t [N_AIE-1:0]   res_data,
  input  logic [N_AIE-1:0]   res_last,
  output logic [N_AIE-1:0]   res_ready,
  // write-back of the new centres
  input  logic [ADDR_W-1:0]  res_base,
  output logic               wr_valid,
  output logic [ADDR_W-1:0]  wr_addr,
  output vec_t               wr_data,
  input  logic               wr_ready,
  output logic               busy,
  output logic               done,
  output logic               empty_cluster   // a cluster kept its centre
);

  localparam int unsigned CHUNKS = (MAX_CLUSTERS + LANES - 1) / LANES;
  localparam int unsigned NK     = CHUNKS * LANES;
  localparam int unsigned KW     = $clog2(NK);
  localparam int unsigned CH_W   = (CHUNKS > 1) ? $clog2(CHUNKS) : 1;
  localparam int unsigned TW     = (N_AIE > 1) ? $clog2(N_AIE) : 1;

  typedef enum logic [2:0] {C_HDR, C_CLU, C_TILE, C_DIV, C_DIVW, C_WR} state_t;
  state_t state_q;

  logic [KW:0]     ncl_q;
  logic [CH_W:0]   nchunk_q;
  logic [CH_W-1:0] chunk_q;
  logic [CH_W:0]   beat_q;
  logic [TW-1:0]   tile_q;
  logic [KW-1:0]   k_q;

  point_t      init_q [NK];
  point_t      sum_q  [NK];
  logic [31:0] cnt_q  [NK];
  point_t      new_q  [NK];

  header_t hdr;
  assign hdr = header_t'(ctl_data);

  // ---------------- tile result intake ----------------
  vec_t       rbeat;
  count_vec_t rcnt;
  logic       rvalid, rlast;
  logic [CH_W-1:0] bchunk;
  assign rbeat  = res_data[tile_q];
  assign rcnt   = count_vec_t'(rbeat);
  assign rvalid = res_valid[tile_q];
  assign rlast  = res_last[tile_q];
  assign bchunk = beat_q[CH_W:1];

  point_t [LANES-1:0] cur_sum, add_out;
  always_comb begin
    for (int l = 0; l < LANES; l++)
      cur_sum[l] = sum_q[int'(bchunk) * LANES + l];
  end
  for (genvar l = 0; l < LANES; l++) begin : g_add
    fp32_add u_x (.a(cur_sum[l].x), .b(rbeat[l].x), .y(add_out[l].x));
    fp32_add u_y (.a(cur_sum[l].y), .b(rbeat[l].y), .y(add_out[l].y));
  end

  always_comb begin
    res_ready = '0;
    if (state_q == C_TILE) res_ready[tile_q] = 1'b1;
  end
  assign ctl_ready = (state_q == C_HDR) || (state_q == C_CLU);

  // ---------------- mean computation ----------------
  fp32_t  cnt_fp, qx, qy;
  logic   div_start, dx_done, dy_done;
  u32_to_fp32 u_cvt (.u(cnt_q[k_q]), .y(cnt_fp));
  fp32_div u_divx (.clk, .rst_n, .start(div_start), .a(sum_q[k_q].x), .b(cnt_fp),
                   .busy(), .done(dx_done), .y(qx));
  fp32_div u_divy (.clk, .rst_n, .start(div_start), .a(sum_q[k_q].y), .b(cnt_fp),
                   .busy(), .done(dy_done), .y(qy));
  assign div_start     = (state_q == C_DIV) && (cnt_q[k_q] != 32'd0);
  assign empty_cluster = (state_q == C_DIV) && (cnt_q[k_q] == 32'd0);

  // ---------------- write-back ----------------
  assign wr_valid = (state_q == C_WR);
  assign wr_addr  = res_base + ADDR_W'(chunk_q);
  always_comb begin
    for (int l = 0; l < LANES; l++)
      wr_data[l] = new_q[int'(chunk_q) * LANES + l];
  end
  assign busy = (state_q != C_HDR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= C_HDR;
      ncl_q <= '0; nchunk_q <= '0; chunk_q <= '0; beat_q <= '0; tile_q <= '0;
      k_q <= '0; done <= 1'b0;
      for (int k = 0; k < NK; k++) begin
        init_q[k] <= '0; sum_q[k] <= '0; cnt_q[k] <= '0; new_q[k] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state_q)
        C_HDR: if (ctl_valid) begin
          ncl_q    <= (KW+1)'(hdr.n_clusters);
          nchunk_q <= (CH_W+1)'((hdr.n_clusters + LANES - 1) / LANES);
          chunk_q  <= '0;
          for (int k = 0; k < NK; k++) begin
            sum_q[k] <= '0; cnt_q[k] <= '0; new_q[k] <= '0;
          end
          state_q <= C_CLU;
        end
        C_CLU: if (ctl_valid) begin
          for (int l = 0; l < LANES; l++)
            init_q[int'(chunk_q) * LANES + l] <= ctl_data[l];
          if ((CH_W+1)'(chunk_q) == nchunk_q - 1'b1) begin
            chunk_q <= '0;
            beat_q  <= '0;
            tile_q  <= '0;
            state_q <= C_TILE;
          end else begin
            chunk_q <= chunk_q + 1'b1;
          end
        end
        C_TILE: if (rvalid) begin
          for (int l = 0; l < LANES; l++) begin
            if (!beat_q[0]) sum_q[int'(bchunk) * LANES + l] <= add_out[l];
            else            cnt_q[int'(bchunk) * LANES + l] <=
                              cnt_q[int'(bchunk) * LANES + l] + rcnt.cnt[l];
          end
          if (rlast) begin
            beat_q <= '0;
            if (tile_q == TW'(N_AIE - 1)) begin
              k_q     <= '0;
              state_q <= C_DIV;
            end else begin
              tile_q <= tile_q + 1'b1;
            end
          end else begin
            beat_q <= beat_q + 1'b1;
          end
        end
        C_DIV: begin
          if (cnt_q[k_q] == 32'd0) begin
            new_q[k_q] <= init_q[k_q];
            if ((KW+1)'(k_q) == ncl_q - 1'b1) begin
              chunk_q <= '0;
              state_q <= C_WR;
            end else begin
              k_q <= k_q + 1'b1;
            end
          end else begin
            state_q <= C_DIVW;
          end
        end
        C_DIVW: if (dx_done && dy_done) begin
          new_q[k_q] <= '{x: qx, y: qy};
          if ((KW+1)'(k_q) == ncl_q - 1'b1) begin
            chunk_q <= '0;
            state_q <= C_WR;
          end else begin
            k_q     <= k_q + 1'b1;
            state_q <= C_DIV;
          end
        end
        C_WR: if (wr_ready) begin
          if ((CH_W+1)'(chunk_q) == nchunk_q - 1'b1) begin
            done    <= 1'b1;
            state_q <= C_HDR;
          end else begin
            chunk_q <= chunk_q + 1'b1;
          end
        end
        default: state_q <= C_HDR;
      endcase
    end
  end

endmodule
