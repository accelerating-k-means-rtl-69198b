// End-to-end test of the accelerator with 4 tiles (and up to 32 clusters), so
// that the tiles, not the dispatcher, set the pace. A memory model with random request back-pressure, random
// in-order read latency and random write back-pressure holds the centres and
// the points. Each case runs one full iteration and compares the written
// centres with a reference that follows the same dispatch rule (vector v to
// tile v mod 4), assigns each point to its nearest centre by fp32 squared
// distance (lowest index on ties), accumulates per tile in point order, adds
// the tiles in order and divides by the counts; a centre with no points
// keeps its place. Every mechanism must occur at least once: back-pressure
// on the dispatcher, padding vectors, dropped padded points, full tile input
// buffers, empty clusters and two-chunk cluster sets.
module tb_kmeans_top;
  import kmeans_pkg::*;
  import fp_ref_pkg::*;
  import kmeans_ref_pkg::*;

  localparam int N     = 4;      // reduced tile count: tiles become the bottleneck
  localparam int MEMW  = 512;
  localparam int CBASE = 0, PBASE = 16, RBASE = 8;

  int checks = 0, failures = 0;
  int ev_bp = 0, ev_padv = 0, ev_pads = 0, ev_tst = 0, ev_empty = 0, ev_twochunk = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         start, busy, done;
  logic [31:0]  n_clusters, n_points;
  logic         rd_req_valid, rd_req_ready, rd_rsp_valid;
  logic [31:0]  rd_req_addr, wr_addr;
  vec_t         rd_rsp_data, wr_data;
  logic         wr_valid, wr_ready;
  logic         ev_backpressure, ev_pad_vector, ev_pad_skip, ev_tile_stall, ev_empty_cluster;

  kmeans_top #(.N_AIE(N)) dut (
    .clk, .rst_n, .start, .n_clusters, .n_points,
    .clu_base(32'(CBASE)), .pts_base(32'(PBASE)), .res_base(32'(RBASE)),
    .busy, .done,
    .rd_req_valid, .rd_req_addr, .rd_req_ready, .rd_rsp_valid, .rd_rsp_data,
    .wr_valid, .wr_addr, .wr_data, .wr_ready,
    .ev_backpressure, .ev_pad_vector, .ev_pad_skip, .ev_tile_stall, .ev_empty_cluster);

  vec_t   mem [MEMW];
  longint cyc = 0;
  int     max_lat, bp_pct;
  typedef struct { int addr; longint t; } rq_t;
  rq_t    rq[$];

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (ev_backpressure)  ev_bp++;
    if (ev_pad_vector)    ev_padv++;
    if (ev_pad_skip)      ev_pads++;
    if (ev_tile_stall)    ev_tst++;
    if (ev_empty_cluster) ev_empty++;
    if (rd_req_valid && rd_req_ready) begin
      longint t;
      t = cyc + 1 + longint'($urandom % max_lat);
      if (rq.size() > 0 && rq[$].t >= t) t = rq[$].t + 1;
      rq.push_back('{addr: int'(rd_req_addr), t: t});
    end
    if (rd_rsp_valid) void'(rq.pop_front());
    if (wr_valid && wr_ready) mem[int'(wr_addr) % MEMW] = wr_data;
  end

  always @(negedge clk) begin
    rd_req_ready <= ($urandom % 100) >= bp_pct;
    wr_ready     <= ($urandom % 100) >= bp_pct;
    if (rq.size() > 0 && rq[0].t <= cyc) begin
      rd_rsp_valid <= 1'b1;
      rd_rsp_data  <= mem[rq[0].addr % MEMW];
    end else begin
      rd_rsp_valid <= 1'b0;
      rd_rsp_data  <= '0;
    end
  end

  // mode 1 places the last centre far away so that it gets no points
  task automatic run_case(int K, int NP, int lat, int bp, int mode);
    point_t C[32], P[$];
    point_t E[32];
    int     nch, nvm, vpt;
    longint t0;
    max_lat = lat; bp_pct = bp;
    nch = (K + 15) / 16;
    nvm = (NP + 15) / 16;
    vpt = (NP + 16 * N - 1) / (16 * N);
    if (nch == 2) ev_twochunk++;
    for (int k = 0; k < 32; k++) begin
      C[k] = '{x: rand_f(-1, 3), y: rand_f(-1, 3)};
      if (mode == 1 && k == K - 1) C[k] = '{x: 32'h4A00_0000, y: 32'hCA00_0000};
    end
    for (int c = 0; c < 2; c++)
      for (int l = 0; l < 16; l++) mem[CBASE + c][l] = C[c*16+l];
    P.delete();
    for (int i = 0; i < nvm * 16; i++) begin
      point_t p;
      p = '{x: rand_f(-1, 3), y: rand_f(-1, 3)};
      P.push_back(p);
      mem[PBASE + i / 16][i % 16] = p;
    end
    ref_iteration(C, P, K, NP, N, E);
    // run
    for (int c = 0; c < 2; c++) mem[RBASE + c] = '1;
    @(negedge clk);
    n_clusters = K; n_points = NP; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = cyc;
    while (!done) @(posedge clk);
    $display("K=%0d points=%0d: iteration took %0d clocks", K, NP, cyc - t0);
    repeat (2) @(posedge clk);
    for (int k = 0; k < K; k++) begin
      point_t e, g;
      e = E[k];
      g = mem[RBASE + k / 16][k % 16];
      checks++;
      if (g !== e) begin
        failures++;
        if (failures < 10) $display("FAIL K=%0d NP=%0d centre %0d got %h exp %h", K, NP, k, g, e);
      end
    end
    for (int k = K; k < nch * 16; k++) begin
      checks++;
      if (mem[RBASE + k / 16][k % 16] !== '0) begin
        failures++;
        $display("FAIL K=%0d unused lane %0d not zero", K, k);
      end
    end
  endtask

  initial begin
    start = 0; n_clusters = 0; n_points = 0;
    rd_rsp_valid = 0; rd_rsp_data = '0; rd_req_ready = 0; wr_ready = 0;
    max_lat = 1; bp_pct = 0;
    for (int i = 0; i < MEMW; i++) mem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_case(4,  256,  1, 0,  0);    // 4 vectors per tile, no padding
    run_case(32, 500,  4, 20, 1);    // two chunks, padding, empty cluster
    run_case(17, 20,   3, 30, 1);    // two tiles receive only padding
    run_case(16, 1024, 1, 0,  0);    // 16 vectors per tile, full rate
    checks++;
    if (ev_bp == 0 || ev_padv == 0 || ev_pads == 0 || ev_tst == 0 || ev_empty == 0 ||
        ev_twochunk == 0) begin
      failures++;
      $display("FAIL mechanism never seen");
    end
    $display("events: backpressure=%0d pad_vectors=%0d pad_skips=%0d tile_stalls=%0d empty_clusters=%0d two_chunk_runs=%0d",
             ev_bp, ev_padv, ev_pads, ev_tst, ev_empty, ev_twochunk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
