// Self-checking test of the data collector with 4 tiles. The dispatcher side
// sends the data-information beat and the current centres; each tile stream
// offers its result block (per chunk a beat of fp32 sums and a beat of
// counts) with random gaps, all at once, and the write port applies random
// back-pressure. The written centres are compared with a reference: sums
// added in tile order with fp32 rounding, integer counts, mean by correctly
// rounded division, and the current centre kept where the count is zero.
module tb_data_collector;
  import kmeans_pkg::*;
  import fp_ref_pkg::*;

  localparam int N = 4;
  int checks = 0, failures = 0, empty_ev = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             ctl_valid, ctl_ready;
  vec_t             ctl_data;
  logic [N-1:0]     res_valid, res_last, res_ready;
  vec_t [N-1:0]     res_data;
  logic             wr_valid, wr_ready, busy, done, empty_cluster;
  logic [31:0]      wr_addr;
  vec_t             wr_data;

  data_collector #(.N_AIE(N), .MAX_CLUSTERS(32), .ADDR_W(32)) dut (
    .clk, .rst_n, .ctl_valid, .ctl_data, .ctl_ready,
    .res_valid, .res_data, .res_last, .res_ready,
    .res_base(32'd100), .wr_valid, .wr_addr, .wr_data, .wr_ready,
    .busy, .done, .empty_cluster);

  vec_t ctl_q[$];
  vec_t tq[N][$];
  vec_t wq[$];
  int   waddr[$];
  int   gap_pct;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drivers: present the head of each queue, pop on handshake
  always @(posedge clk) begin
    if (empty_cluster) empty_ev++;
    if (ctl_valid && ctl_ready) void'(ctl_q.pop_front());
    for (int t = 0; t < N; t++)
      if (res_valid[t] && res_ready[t]) void'(tq[t].pop_front());
    if (wr_valid && wr_ready) begin
      wq.push_back(wr_data);
      waddr.push_back(int'(wr_addr));
    end
  end
  always @(negedge clk) begin
    ctl_valid <= (ctl_q.size() > 0) && (($urandom % 100) >= gap_pct);
    ctl_data  <= (ctl_q.size() > 0) ? ctl_q[0] : '0;
    for (int t = 0; t < N; t++) begin
      // hold a beat once offered, as the stream rule requires
      if (!(res_valid[t] && !res_ready[t])) begin
        res_valid[t] <= (tq[t].size() > 0) && (($urandom % 100) >= gap_pct);
        res_data[t]  <= (tq[t].size() > 0) ? tq[t][0] : '0;
        res_last[t]  <= (tq[t].size() == 1);
      end
    end
    wr_ready <= ($urandom % 100) >= gap_pct;
  end

  task automatic run_case(int K, int gap);
    point_t init[32], tsum[N][32], esum[32];
    int     tcnt[N][32], ecnt[32];
    int     nch;
    header_t h;
    gap_pct = gap;
    nch = (K + 15) / 16;
    for (int k = 0; k < 32; k++) begin
      init[k] = '{x: rand_f(-3, 5), y: rand_f(-3, 5)};
      esum[k] = '0; ecnt[k] = 0;
      for (int t = 0; t < N; t++) begin
        // every fourth cluster gets no points at all
        tcnt[t][k] = (k % 4 == 2) ? 0 : int'($urandom % 6);
        tsum[t][k] = (tcnt[t][k] == 0) ? '0 : '{x: rand_f(-3, 8), y: rand_f(-3, 8)};
      end
    end
    h = '0; h.n_clusters = K;
    ctl_q.push_back(vec_t'(h));
    for (int c = 0; c < nch; c++) begin
      vec_t v;
      for (int l = 0; l < 16; l++) v[l] = init[c*16+l];
      ctl_q.push_back(v);
    end
    for (int t = 0; t < N; t++)
      for (int c = 0; c < nch; c++) begin
        vec_t v; count_vec_t cv;
        cv = '0;
        for (int l = 0; l < 16; l++) begin
          v[l] = (c*16 + l < K) ? tsum[t][c*16+l] : '0;
          cv.cnt[l] = (c*16 + l < K) ? 32'(tcnt[t][c*16+l]) : 32'd0;
        end
        tq[t].push_back(v);
        tq[t].push_back(vec_t'(cv));
      end
    for (int t = 0; t < N; t++)
      for (int k = 0; k < K; k++) begin
        esum[k].x = r_add(esum[k].x, tsum[t][k].x);
        esum[k].y = r_add(esum[k].y, tsum[t][k].y);
        ecnt[k] += tcnt[t][k];
      end
    wq.delete(); waddr.delete();
    while (!done) @(posedge clk);
    repeat (2) @(posedge clk);
    checks++;
    if (wq.size() != nch) begin
      failures++;
      $display("FAIL K=%0d: %0d words written", K, wq.size());
    end
    for (int c = 0; c < nch && c < wq.size(); c++) begin
      checks++;
      if (waddr[c] != 100 + c) begin failures++; $display("FAIL address %0d", waddr[c]); end
      for (int l = 0; l < 16; l++) begin
        int k = c * 16 + l;
        point_t e;
        if (k >= K)           e = '0;
        else if (ecnt[k] == 0) e = init[k];
        else begin
          fp32_t n;
          n = f_round(real'(ecnt[k]));
          e = '{x: r_div(esum[k].x, n), y: r_div(esum[k].y, n)};
        end
        checks++;
        if (wq[c][l] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL K=%0d cluster %0d got %h exp %h", K, k, wq[c][l], e);
        end
      end
    end
  endtask

  initial begin
    ctl_valid = 0; ctl_data = '0; res_valid = '0; res_data = '0; res_last = '0;
    wr_ready = 0; gap_pct = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_case(4, 0);
    run_case(32, 30);
    run_case(17, 60);
    run_case(1, 10);
    run_case(16, 0);
    checks++;
    if (empty_ev == 0) begin failures++; $display("FAIL no empty cluster seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
