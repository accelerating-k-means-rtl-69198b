// Self-checking test of the data dispatcher with 4 tiles. A memory model with
// random request back-pressure and random in-order response latency holds
// random cluster and point words; every destination takes beats with random
// back-pressure. For each destination the received sequence is compared with
// what the dispatch rule gives: its data-information beat (cluster count,
// vectors per tile, padded points of that tile, counted here point by point),
// all cluster vectors, and, for tile t, point vectors t, t+4, t+8, ... with
// zero vectors past the end of the data. Reads outside the cluster and point
// ranges count as failures. A full-rate case checks that one vector leaves
// per clock.
module tb_data_dispatcher;
  import kmeans_pkg::*;

  localparam int N = 4;
  localparam int ND = N + 1;
  int checks = 0, failures = 0;
  int stall_ev = 0, pad_ev = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              start, busy, done;
  logic [31:0]       n_clusters, n_points, clu_base, pts_base;
  logic              rd_req_valid, rd_req_ready, rd_rsp_valid;
  logic [31:0]       rd_req_addr;
  vec_t              rd_rsp_data;
  logic [ND-1:0]     out_valid, out_ready;
  vec_t [ND-1:0]     out_data;
  logic              stall, pad_vec;

  data_dispatcher #(.N_AIE(N), .ADDR_W(32), .FIFO_DEPTH(8)) dut (
    .clk, .rst_n, .start, .n_clusters, .n_points, .clu_base, .pts_base, .busy, .done,
    .rd_req_valid, .rd_req_addr, .rd_req_ready, .rd_rsp_valid, .rd_rsp_data,
    .out_valid, .out_data, .out_ready, .stall, .pad_vec);

  vec_t   mem [256];
  int     req_pct, rdy_pct, max_lat;
  longint cyc = 0;
  int     bad_reads = 0;
  int     lo_c, hi_c, lo_p, hi_p;

  typedef struct { int addr; longint t; } rq_t;
  rq_t    rq[$];
  vec_t   rx[ND][$];

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (stall) stall_ev++;
    if (pad_vec) pad_ev++;
    if (rd_req_valid && rd_req_ready) begin
      longint t;
      int a;
      a = int'(rd_req_addr);
      if (!((a >= lo_c && a < hi_c) || (a >= lo_p && a < hi_p))) bad_reads++;
      t = cyc + 1 + longint'($urandom % max_lat);
      if (rq.size() > 0 && rq[$].t >= t) t = rq[$].t + 1;
      rq.push_back('{addr: a, t: t});
    end
    if (rd_rsp_valid) void'(rq.pop_front());
    for (int d = 0; d < ND; d++)
      if (out_valid[d] && out_ready[d]) rx[d].push_back(out_data[d]);
  end

  always @(negedge clk) begin
    rd_req_ready <= ($urandom % 100) < req_pct;
    for (int d = 0; d < ND; d++) out_ready[d] <= ($urandom % 100) < rdy_pct;
    if (rq.size() > 0 && rq[0].t <= cyc) begin
      rd_rsp_valid <= 1'b1;
      rd_rsp_data  <= mem[rq[0].addr & 255];
    end else begin
      rd_rsp_valid <= 1'b0;
      rd_rsp_data  <= '0;
    end
  end

  task automatic run_case(int K, int NP, int rq_pct, int rd_pct, int lat, bit check_rate);
    int nch, nvm, vpt;
    longint t0, t1;
    req_pct = rq_pct; rdy_pct = rd_pct; max_lat = lat;
    nch = (K + 15) / 16;
    nvm = (NP + 15) / 16;
    vpt = (NP + 16 * N - 1) / (16 * N);
    lo_c = 10; hi_c = 10 + nch; lo_p = 40; hi_p = 40 + nvm;
    for (int d = 0; d < ND; d++) rx[d].delete();
    @(negedge clk);
    n_clusters = K; n_points = NP; clu_base = 10; pts_base = 40;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = cyc;
    while (!done) @(posedge clk);
    t1 = cyc;
    repeat (2) @(posedge clk);
    for (int d = 0; d < ND; d++) begin
      vec_t    exp_q[$];
      header_t h;
      h = '0;
      h.n_clusters = K;
      if (d < N) begin
        int valid = 0;
        for (int j = 0; j < vpt; j++) begin
          int v = d + j * N;
          int r = NP - 16 * v;
          valid += (r < 0) ? 0 : (r > 16 ? 16 : r);
        end
        h.n_vectors = vpt;
        h.n_pad     = vpt * 16 - valid;
      end
      exp_q.push_back(vec_t'(h));
      for (int c = 0; c < nch; c++) exp_q.push_back(mem[10 + c]);
      if (d < N)
        for (int j = 0; j < vpt; j++) begin
          int v = d + j * N;
          exp_q.push_back(v < nvm ? mem[40 + v] : vec_t'('0));
        end
      checks++;
      if (rx[d].size() != exp_q.size()) begin
        failures++;
        $display("FAIL K=%0d NP=%0d dest %0d: %0d beats, expected %0d", K, NP, d,
                 rx[d].size(), exp_q.size());
      end else begin
        for (int i = 0; i < exp_q.size(); i++) begin
          checks++;
          if (rx[d][i] !== exp_q[i]) begin
            failures++;
            if (failures < 10) $display("FAIL K=%0d NP=%0d dest %0d beat %0d", K, NP, d, i);
          end
        end
      end
    end
    checks++;
    if (bad_reads != 0) begin failures++; $display("FAIL %0d reads out of range", bad_reads); end
    if (check_rate) begin
      // header clock, then one vector per clock, then the drain of 2 clocks
      longint items = nch + vpt * N;
      checks++;
      if (t1 - t0 > items + 4) begin
        failures++;
        $display("FAIL rate: %0d clocks for %0d vectors", t1 - t0, items);
      end
    end
  endtask

  initial begin
    start = 0; n_clusters = 0; n_points = 0; clu_base = 0; pts_base = 0;
    rd_rsp_valid = 0; rd_rsp_data = '0; rd_req_ready = 0; out_ready = '0;
    req_pct = 100; rdy_pct = 100; max_lat = 1;
    for (int i = 0; i < 256; i++)
      for (int l = 0; l < 16; l++) mem[i][l] = point_t'({$urandom, $urandom});
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_case(16, 64 * 4, 100, 100, 1, 1);     // exact fit, full rate
    run_case(32, 600,    100, 100, 1, 1);     // padding, two chunks, full rate
    run_case(5,  37,     70,  60, 4, 0);
    run_case(17, 200,    50,  40, 6, 0);
    run_case(32, 1,      80,  30, 3, 0);      // one point: three tiles all padding
    run_case(8,  1024,   90,  75, 5, 0);
    checks++;
    if (stall_ev == 0 || pad_ev == 0) begin
      failures++;
      $display("FAIL events stall=%0d pad=%0d", stall_ev, pad_ev);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
