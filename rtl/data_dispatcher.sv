// Data dispatcher: moves the clusters and points of one K-Means iteration
// from memory to the compute tiles (the role of the memory-transfer engine
// and shim tiles of an NPU).
//
// On `start` it latches the problem size and base addresses and then sends,
// on destination streams 0..N_AIE-1 (tiles) and N_AIE (data collector):
//   1. a data-information beat to every destination (header_t). A tile's
//      header carries the cluster count, the number of point vectors it will
//      get and how many of its points are padding; the collector's carries the
//      cluster count only.
//   2. every cluster vector, read once from memory and broadcast to all
//      N_AIE+1 destinations (every tile needs all centres, the collector keeps
//      them as the starting point of the update).
//   3. the point vectors: vector v goes to tile v mod N_AIE. The stream is
//      padded to a multiple of N_AIE vectors of 16 points, so every tile gets
//      the same number of vectors; vectors wholly past the end of the data are
//      made here as zeros and never read from memory.
// A broadcast beat is held until every destination has taken it.
//
// Memory port: one 1024-bit word per request, word addresses, in-order
// responses of any latency of one cycle or more, and no back-pressure on
// responses: at most FIFO_DEPTH words are in flight or buffered, so every
// response has room. With a memory answering each cycle and ready tiles, one
// vector leaves per clock. Padding to N_AIE x 16 points, the data
// information and the all-clusters/share-of-points split follow the
// reference design; the header format, the round-robin order of vectors and the
// memory handshake are this design's choices. n_clusters must be at least 1
// and no more than the tiles and the collector hold.
module data_dispatcher
  import kmeans_pkg::*;
#(
  parameter int unsigned N_AIE        = 32,
  parameter int unsigned ADDR_W       = 32,
  parameter int unsigned FIFO_DEPTH   = 8,
  localparam int unsigned N_DST       = N_AIE + 1
)(
  input  logic               clk,
  input  logic               rst_n,
  // command
  input  logic               start,
  input  logic [31:0]        n_clusters,
  input  logic [31:0]        n_points,
  input  logic [ADDR_W-1:0]  clu_base,
  input  logic [ADDR_W-1:0]  pts_base,
  output logic               busy,
  output logic               done,
  // memory read port
  output logic               rd_req_valid,
  output logic [ADDR_W-1:0]  rd_req_addr,
  input  logic               rd_req_ready,
  input  logic               rd_rsp_valid,
  input  vec_t               rd_rsp_data,
  // destination streams
  output logic [N_DST-1:0]   out_valid,
  output vec_t [N_DST-1:0]   out_data,
  input  logic [N_DST-1:0]   out_ready,
  // observation
  output logic               stall,       // a destination is holding a beat back
  output logic               pad_vec      // a padding vector is being queued
);

  localparam int unsigned DW  = $clog2(N_DST);
  localparam int unsigned FW  = $clog2(FIFO_DEPTH);

  typedef struct packed {
    logic          bcast;
    logic [DW-1:0] dest;
  } desc_t;

  typedef struct packed {
    desc_t d;
    vec_t  data;
  } entry_t;

  typedef enum logic [1:0] {D_IDLE, D_HDR, D_RUN} state_t;
  state_t state_q;

  logic [31:0]       ncl_q, npts_q;
  logic [ADDR_W-1:0] clu_base_q, pts_base_q;
  logic [31:0]       nchunk_q;     // cluster vectors
  logic [31:0]       vpt_q;        // point vectors per tile
  logic [31:0]       nvec_mem_q;   // point vectors held in memory
  logic [31:0]       nitems_q;     // cluster + point vectors to send
  logic [31:0]       gen_q;        // next item to issue

  // ---------------- per-tile data information ----------------
  header_t [N_DST-1:0] hdr;
  always_comb begin
    logic [31:0] fv, rem, cnt_full, valid_t;
    fv  = npts_q / LANES;
    rem = npts_q % LANES;
    for (int t = 0; t < N_DST; t++) begin
      hdr[t] = '0;
      hdr[t].n_clusters = ncl_q;
      if (t < N_AIE) begin
        cnt_full = (fv > 32'(t)) ? (fv - 32'(t) + N_AIE - 1) / N_AIE : 32'd0;
        valid_t  = cnt_full * LANES;
        if (rem != 0 && (fv % N_AIE) == 32'(t)) valid_t = valid_t + rem;
        hdr[t].n_vectors = vpt_q;
        hdr[t].n_pad     = vpt_q * LANES - valid_t;
      end
    end
  end

  // ---------------- item generator ----------------
  logic        gen_live, gen_is_clu, gen_pad;
  logic [31:0] gen_v;
  desc_t       gen_desc;

  assign gen_live   = (state_q == D_RUN) && (gen_q < nitems_q);
  assign gen_is_clu = gen_q < nchunk_q;
  assign gen_v      = gen_q - nchunk_q;
  assign gen_pad    = !gen_is_clu && (gen_v >= nvec_mem_q);
  always_comb begin
    gen_desc.bcast = gen_is_clu;
    gen_desc.dest  = gen_is_clu ? DW'(0) : DW'(gen_v % N_AIE);
  end

  // ---------------- buffering ----------------
  entry_t            head;
  logic              d_empty, d_full, d_push, d_pop;
  logic [FW:0]       d_count;
  entry_t            d_din;
  desc_t             tag_out;
  logic              t_empty;
  logic [FW:0]       t_count;
  logic [FW:0]       inflight;       // = t_count, requests awaiting data
  logic              issue, pad_push;

  assign inflight = t_count;

  // one more read fits if buffered + in-flight words leave a free slot
  assign issue    = gen_live && !gen_pad && rd_req_ready &&
                    ((d_count + inflight) < (FW+1)'(FIFO_DEPTH));
  assign pad_push = gen_live && gen_pad && (inflight == '0) && !d_full;

  assign rd_req_valid = gen_live && !gen_pad &&
                        ((d_count + inflight) < (FW+1)'(FIFO_DEPTH));
  assign rd_req_addr  = gen_is_clu ? clu_base_q + ADDR_W'(gen_q)
                                   : pts_base_q + ADDR_W'(gen_v);
  assign pad_vec      = pad_push;

  sync_fifo #(.T(desc_t), .DEPTH(FIFO_DEPTH)) u_tag (
    .clk, .rst_n,
    .push (issue),
    .din  (gen_desc),
    .pop  (rd_rsp_valid),
    .dout (tag_out),
    .empty(t_empty), .full(),
    .count(t_count)
  );

  assign d_push = rd_rsp_valid || pad_push;
  always_comb begin
    if (rd_rsp_valid) d_din = '{d: tag_out, data: rd_rsp_data};
    else              d_din = '{d: gen_desc, data: '0};
  end

  sync_fifo #(.T(entry_t), .DEPTH(FIFO_DEPTH)) u_data (
    .clk, .rst_n,
    .push (d_push),
    .din  (d_din),
    .pop  (d_pop),
    .dout (head),
    .empty(d_empty), .full(d_full),
    .count(d_count)
  );

  // ---------------- output side ----------------
  logic [N_DST-1:0] pend_q, pend_eff, full_mask, accepted, remaining;
  logic             started_q, have_beat;

  always_comb begin
    if (state_q == D_HDR || head.d.bcast) full_mask = '1;
    else full_mask = N_DST'(1) << head.d.dest;
  end
  assign have_beat = (state_q == D_HDR) || (state_q == D_RUN && !d_empty);
  assign pend_eff  = started_q ? pend_q : full_mask;
  assign out_valid = have_beat ? pend_eff : '0;
  assign accepted  = out_valid & out_ready;
  assign remaining = pend_eff & ~accepted;
  assign d_pop     = (state_q == D_RUN) && !d_empty && (remaining == '0);
  assign stall     = |(out_valid & ~out_ready);

  always_comb begin
    for (int i = 0; i < N_DST; i++)
      out_data[i] = (state_q == D_HDR) ? vec_t'(hdr[i]) : head.data;
  end

  assign busy = (state_q != D_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= D_IDLE;
      ncl_q <= '0; npts_q <= '0; clu_base_q <= '0; pts_base_q <= '0;
      nchunk_q <= '0; vpt_q <= '0; nvec_mem_q <= '0; nitems_q <= '0;
      gen_q <= '0; pend_q <= '0; started_q <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (have_beat) begin
        if (remaining == '0) started_q <= 1'b0;
        else begin
          started_q <= 1'b1;
          pend_q    <= remaining;
        end
      end
      unique case (state_q)
        D_IDLE: if (start) begin
          ncl_q      <= n_clusters;
          npts_q     <= n_points;
          clu_base_q <= clu_base;
          pts_base_q <= pts_base;
          nchunk_q   <= (n_clusters + LANES - 1) / LANES;
          nvec_mem_q <= (n_points + LANES - 1) / LANES;
          vpt_q      <= (n_points + LANES * N_AIE - 1) / (LANES * N_AIE);
          nitems_q   <= (n_clusters + LANES - 1) / LANES +
                        ((n_points + LANES * N_AIE - 1) / (LANES * N_AIE)) * N_AIE;
          gen_q      <= '0;
          started_q  <= 1'b0;
          state_q    <= D_HDR;
        end
        D_HDR: if (remaining == '0) state_q <= D_RUN;
        D_RUN: begin
          if (issue || pad_push) gen_q <= gen_q + 32'd1;
          if (gen_q == nitems_q && d_empty && inflight == '0) begin
            done    <= 1'b1;
            state_q <= D_IDLE;
          end
        end
        default: state_q <= D_IDLE;
      endcase
    end
  end

  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
                                   rd_rsp_valid |-> !t_empty)
    else $error("data_dispatcher: read response without a request");

endmodule
