// Self-checking test of one compute tile. Each case sends a data-information
// beat, the cluster vectors and the point vectors (some cases with padded
// points at the end), then collects the result block and compares it with a
// reference: nearest centre by fp32 squared distance with the lowest index
// winning ties, sums added in point order with fp32 rounding, and counts.
// Cases cover 1 to 32 clusters (one and two cluster chunks), centres placed
// so that ties and empty clusters occur, random gaps on the input and random
// back-pressure on the output. In full-rate cases the compute time is checked:
// one clock per valid point and cluster chunk, plus one clock for each vector
// that holds padding.
module tb_kmeans_tile;
  import kmeans_pkg::*;
  import fp_ref_pkg::*;

  int checks = 0, failures = 0;
  int pad_events = 0, stall_events = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  vec_stream_if in_s  (.clk, .rst_n);
  vec_stream_if out_s (.clk, .rst_n);
  logic pad_skip, in_stall;

  kmeans_tile #(.MAX_CLUSTERS(32)) dut (.clk, .rst_n, .in_s, .out_s, .pad_skip, .in_stall);

  always @(posedge clk) begin
    if (pad_skip) pad_events++;
    if (in_stall) stall_events++;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  vec_t   q[$];          // beats to send
  vec_t   got[$];        // beats received
  logic   got_last[$];
  int     gap_pct, bp_pct;
  longint t_clu_done, t_out;

  initial begin
    in_s.valid = 1'b0; in_s.data = '0; in_s.last = 1'b0;
  end

  // sink
  longint cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_s.valid && out_s.ready) begin
      got.push_back(out_s.data);
      got_last.push_back(out_s.last);
    end
    if (out_s.valid && t_out == 0) t_out = cyc;
  end
  always @(negedge clk) out_s.ready <= ($urandom % 100) >= bp_pct;

  task automatic send_all(int n_clu_beats);
    int sent = 0;
    while (q.size() > 0) begin
      @(negedge clk);
      if (($urandom % 100) < gap_pct) begin in_s.valid = 1'b0; continue; end
      in_s.valid = 1'b1;
      in_s.data  = q[0];
      @(posedge clk);
      while (!in_s.ready) @(posedge clk);
      void'(q.pop_front());
      sent++;
      if (sent == 1 + n_clu_beats) t_clu_done = cyc;
      #1 in_s.valid = 1'b0;
    end
  endtask

  task automatic run_case(int K, int V, int npad, int gap, int bp, int mode);
    point_t C[32], P[$];
    point_t rsum[32];
    int     rcnt[32];
    int     nch, nvalid, padvec, fmt_err;
    header_t h;
    vec_t v;
    gap_pct = gap; bp_pct = bp;
    nch = (K + 15) / 16;
    // centres: mode 1 gives duplicated centres (ties) and a far centre (empty)
    for (int k = 0; k < 32; k++) begin
      C[k] = '{x: rand_f(-2, 4), y: rand_f(-2, 4)};
      if (mode == 1 && k > 0 && k % 3 == 0) C[k] = C[k-1];
      if (mode == 1 && k == K - 1) C[k] = '{x: 32'h4B00_0000, y: 32'h4B00_0000};
      rsum[k] = '0; rcnt[k] = 0;
    end
    P.delete();
    for (int i = 0; i < V * 16; i++) P.push_back('{x: rand_f(-2, 4), y: rand_f(-2, 4)});
    // stimulus
    h = '0; h.n_clusters = K; h.n_vectors = V; h.n_pad = npad;
    q.push_back(vec_t'(h));
    for (int c = 0; c < nch; c++) begin
      for (int l = 0; l < 16; l++) v[l] = (c*16 + l < K) ? C[c*16+l] : point_t'($urandom);
      q.push_back(v);
    end
    for (int i = 0; i < V; i++) begin
      for (int l = 0; l < 16; l++) v[l] = P[i*16+l];
      q.push_back(v);
    end
    // reference
    nvalid = V * 16 - npad;
    for (int i = 0; i < nvalid; i++) begin
      int bk; fp32_t bd, d;
      bk = 0; bd = '0;
      for (int k = 0; k < K; k++) begin
        d = r_sqdist(P[i].x, P[i].y, C[k].x, C[k].y);
        if (k == 0 || d < bd) begin bk = k; bd = d; end
      end
      rsum[bk].x = r_add(rsum[bk].x, P[i].x);
      rsum[bk].y = r_add(rsum[bk].y, P[i].y);
      rcnt[bk]++;
    end
    padvec = (npad + 15) / 16;
    got.delete(); got_last.delete(); t_out = 0; t_clu_done = 0;
    send_all(nch);
    while (got.size() < 2 * nch) @(posedge clk);
    repeat (3) @(posedge clk);
    // compare
    checks++;
    fmt_err = (got.size() != 2 * nch);
    for (int i = 0; i < got.size(); i++) if (got_last[i] != (i == 2*nch - 1)) fmt_err = 1;
    if (fmt_err) begin failures++; $display("FAIL K=%0d: %0d beats / last flag", K, got.size()); end
    for (int c = 0; c < nch && c < got.size() / 2; c++) begin
      count_vec_t cv;
      cv = count_vec_t'(got[2*c+1]);
      for (int l = 0; l < 16; l++) begin
        int k = c * 16 + l;
        point_t es; int ec;
        es = (k < K) ? rsum[k] : '0;
        ec = (k < K) ? rcnt[k] : 0;
        checks++;
        if (got[2*c][l] !== es || cv.cnt[l] !== 32'(ec)) begin
          failures++;
          if (failures < 10)
            $display("FAIL K=%0d V=%0d pad=%0d cluster %0d got %h/%0d exp %h/%0d",
                     K, V, npad, k, got[2*c][l], cv.cnt[l], es, ec);
        end
      end
    end
    // compute time at full rate: one clock per valid point and chunk
    if (gap == 0 && V > 0) begin
      longint expc;
      // padded vectors: one clock each, partial ones after their real points;
      // 3 clocks of buffer and state overhead from the last cluster beat
      expc = longint'(nvalid) * nch + padvec + 3;
      checks++;
      if (t_out - t_clu_done != expc) begin
        failures++;
        $display("FAIL K=%0d V=%0d pad=%0d: %0d clocks, expected %0d", K, V, npad,
                 t_out - t_clu_done, expc);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_case(4,  4, 0,  0, 0,  0);
    run_case(16, 3, 0,  0, 0,  1);
    run_case(17, 3, 5,  0, 0,  1);
    run_case(32, 4, 20, 0, 0,  0);
    run_case(1,  2, 0,  0, 0,  0);
    run_case(8,  3, 48, 0, 30, 0);   // every vector padding
    run_case(32, 5, 7,  40, 50, 1);
    run_case(13, 6, 0,  30, 70, 1);
    run_case(20, 0, 0,  0, 0,  0);   // no points: counts zero
    checks++;
    if (pad_events == 0 || stall_events == 0) begin
      failures++;
      $display("FAIL events: pad=%0d stall=%0d", pad_events, stall_events);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
