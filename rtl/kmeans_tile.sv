// Compute tile running one share of a Lloyd K-Means iteration (the AI Engine
// core of the accelerator).
//
// Input stream, in order: one data-information beat (header_t: number of
// clusters, number of point vectors, number of padded points), then
// ceil(n_clusters/16) vectors of cluster centres, which are kept in local
// storage, then the point vectors. Each point is compared with 16 centres per
// clock (vec_distance), the nearest centre of the chunk is picked (min_dist)
// and kept if it beats the chunks before; after the last chunk the point is
// added to that cluster's partial sums (accumulate_coords). Centres are not
// moved during the pass. Padded points at the end of the share are dropped
// without computation. When all vectors are done the tile writes, per chunk of
// 16 clusters, one beat of coordinate sums (vec_t) and one beat of point counts
// (count_vec_t); `last` marks the final beat. It then waits for a new header.
//
// Timing: one clock per point and cluster chunk, so 16*ceil(K/16) clocks per
// point vector; the next vector is taken from a 2-entry input buffer without a
// bubble. Input order, vector width, per-point strategy and padding follow the
// reference design; the header and result formats, the buffer and the lowest-index
// tie rule are this design's choices. n_clusters must be between 1 and
// MAX_CLUSTERS.
module kmeans_tile
  import kmeans_pkg::*;
#(
  parameter int unsigned MAX_CLUSTERS = 32
)(
  input  logic          clk,
  input  logic          rst_n,
  vec_stream_if.sink    in_s,
  vec_stream_if.source  out_s,
  output logic          pad_skip,     // a padded point was dropped this cycle
  output logic          in_stall      // input beat offered but buffer full
);

  localparam int unsigned CHUNKS = (MAX_CLUSTERS + LANES - 1) / LANES;
  localparam int unsigned IDX_W  = $clog2(CHUNKS * LANES);
  localparam int unsigned CH_W   = (CHUNKS > 1) ? $clog2(CHUNKS) : 1;
  localparam int unsigned LN_W   = $clog2(LANES);

  typedef enum logic [2:0] {T_HDR, T_CLU, T_PTS, T_CALC, T_OUT} state_t;
  state_t state_q;

  // ---------------- input buffer ----------------
  vec_t        head;
  logic        empty, full, pop;

  sync_fifo #(.T(vec_t), .DEPTH(2)) u_in_fifo (
    .clk, .rst_n,
    .push (in_s.valid && in_s.ready),
    .din  (in_s.data),
    .pop,
    .dout (head),
    .empty, .full,
    .count()
  );
  assign in_s.ready = !full;
  assign in_stall   = in_s.valid && full;

  // ---------------- registers ----------------
  vec_t             clu_mem [CHUNKS];
  vec_t             pvec_q;
  logic [IDX_W:0]   n_clu_q;
  logic [CH_W:0]    n_chunk_q;
  logic [31:0]      vec_left_q;
  logic [31:0]      valid_left_q;
  logic [CH_W-1:0]  chunk_q;
  logic [LN_W-1:0]  lane_q;
  fp32_t            best_d_q;
  logic [IDX_W-1:0] best_i_q;
  logic [CH_W:0]    obeat_q;          // result beat counter (2 per chunk)

  // ---------------- datapath ----------------
  point_t            cur_p;
  fp32_t [LANES-1:0] dvec;
  logic  [LANES-1:0] lane_en;
  fp32_t             cmin;
  logic  [LN_W-1:0]  cidx;
  logic              cany;
  logic              take_cur;
  logic [IDX_W-1:0]  sel_idx;

  assign cur_p = pvec_q[lane_q];

  vec_distance u_dist (.p(cur_p), .c(clu_mem[chunk_q]), .d(dvec));

  always_comb begin
    for (int l = 0; l < LANES; l++)
      lane_en[l] = (int'(chunk_q) * LANES + l) < int'(n_clu_q);
  end

  min_dist u_min (.d(dvec), .en(lane_en), .dmin(cmin), .idx(cidx), .any(cany));

  // a later chunk replaces the best so far only when strictly nearer
  assign take_cur = (chunk_q == '0) || (cany && fp32_pos_lt(cmin, best_d_q));
  assign sel_idx  = take_cur ? IDX_W'(int'(chunk_q) * LANES + int'(cidx)) : best_i_q;

  logic last_chunk, last_lane, is_pad;
  assign last_chunk = (CH_W+1)'(chunk_q) == n_chunk_q - 1'b1;
  assign last_lane  = lane_q == LN_W'(LANES - 1);
  assign is_pad     = (valid_left_q == 32'd0);

  logic acc_en, acc_clear;
  assign acc_en    = (state_q == T_CALC) && !is_pad && last_chunk;
  assign pad_skip  = (state_q == T_CALC) && is_pad;

  vec_t                  rd_sum;
  logic [LANES-1:0][31:0] rd_cnt;
  count_vec_t            cnt_beat;

  accumulate_coords #(.MAX_CLUSTERS(MAX_CLUSTERS)) u_acc (
    .clk, .rst_n,
    .clear   (acc_clear),
    .acc_en,
    .acc_idx (sel_idx),
    .acc_p   (cur_p),
    .rd_chunk(obeat_q[CH_W:1]),
    .rd_sum,
    .rd_cnt
  );

  always_comb begin
    cnt_beat      = '0;
    cnt_beat.cnt  = rd_cnt;
  end

  // vector finished: a padded point ends it early, a real one at lane 15
  logic vec_done;
  assign vec_done = (state_q == T_CALC) && (is_pad || (last_chunk && last_lane));

  // ---------------- control ----------------
  header_t hdr;
  assign hdr = header_t'(head);

  always_comb begin
    pop       = 1'b0;
    acc_clear = 1'b0;
    unique case (state_q)
      T_HDR:  begin pop = !empty; acc_clear = !empty; end
      T_CLU:  pop = !empty;
      T_PTS:  pop = !empty;
      T_CALC: pop = vec_done && (vec_left_q > 32'd1) && !empty;
      default: ;
    endcase
  end

  assign out_s.valid = (state_q == T_OUT);
  assign out_s.data  = obeat_q[0] ? vec_t'(cnt_beat) : rd_sum;
  assign out_s.last  = obeat_q == (CH_W+1)'(2 * int'(n_chunk_q) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= T_HDR;
      pvec_q       <= '0;
      n_clu_q      <= '0;
      n_chunk_q    <= '0;
      vec_left_q   <= '0;
      valid_left_q <= '0;
      chunk_q      <= '0;
      lane_q       <= '0;
      best_d_q     <= '0;
      best_i_q     <= '0;
      obeat_q      <= '0;
      for (int c = 0; c < CHUNKS; c++) clu_mem[c] <= '0;
    end else begin
      unique case (state_q)
        T_HDR: if (!empty) begin
          n_clu_q      <= (IDX_W+1)'(hdr.n_clusters);
          n_chunk_q    <= (CH_W+1)'((hdr.n_clusters + LANES - 1) / LANES);
          vec_left_q   <= hdr.n_vectors;
          valid_left_q <= hdr.n_vectors * LANES - hdr.n_pad;
          chunk_q      <= '0;
          state_q      <= T_CLU;
        end
        T_CLU: if (!empty) begin
          clu_mem[chunk_q] <= head;
          if ((CH_W+1)'(chunk_q) == n_chunk_q - 1'b1) begin
            chunk_q <= '0;
            obeat_q <= '0;
            state_q <= (vec_left_q == 32'd0) ? T_OUT : T_PTS;
          end else begin
            chunk_q <= chunk_q + 1'b1;
          end
        end
        T_PTS: if (!empty) begin
          pvec_q  <= head;
          lane_q  <= '0;
          chunk_q <= '0;
          state_q <= T_CALC;
        end
        T_CALC: begin
          if (!is_pad) begin
            if (last_chunk) begin
              valid_left_q <= valid_left_q - 32'd1;
              chunk_q      <= '0;
              lane_q       <= lane_q + 1'b1;
            end else begin
              chunk_q  <= chunk_q + 1'b1;
              best_d_q <= take_cur ? cmin : best_d_q;
              best_i_q <= sel_idx;
            end
          end
          if (vec_done) begin
            vec_left_q <= vec_left_q - 32'd1;
            lane_q     <= '0;
            chunk_q    <= '0;
            if (vec_left_q == 32'd1) begin
              obeat_q <= '0;
              state_q <= T_OUT;
            end else if (!empty) begin
              pvec_q  <= head;           // next vector without a bubble
            end else begin
              state_q <= T_PTS;
            end
          end
        end
        T_OUT: if (out_s.ready) begin
          obeat_q <= obeat_q + 1'b1;
          if (out_s.last) state_q <= T_HDR;
        end
        default: state_q <= T_HDR;
      endcase
    end
  end

endmodule
