// Self-checking test of the partial cluster update store. Random points are
// added to random clusters (often the same cluster on consecutive cycles),
// with an occasional clear; after each burst every chunk is read back and
// compared with reference sums, rounded after every addition, and counts.
module tb_accumulate_coords;
  import kmeans_pkg::*;
  import fp_ref_pkg::*;

  localparam int K = 32;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        clear, acc_en;
  logic [4:0]  acc_idx;
  point_t      acc_p;
  logic [0:0]  rd_chunk;
  vec_t        rd_sum;
  logic [LANES-1:0][31:0] rd_cnt;

  accumulate_coords #(.MAX_CLUSTERS(K)) dut (
    .clk, .rst_n, .clear, .acc_en, .acc_idx, .acc_p, .rd_chunk, .rd_sum, .rd_cnt);

  point_t      rsum [K];
  logic [31:0] rcnt [K];

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; acc_en = 0; acc_idx = 0; acc_p = '0; rd_chunk = 0;
    for (int k = 0; k < K; k++) begin rsum[k] = '0; rcnt[k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int burst = 0; burst < 40; burst++) begin
      if (burst % 10 == 9) begin
        @(negedge clk); clear = 1'b1; acc_en = 1'b1;   // clear wins over add
        @(negedge clk); clear = 1'b0; acc_en = 1'b0;
        for (int k = 0; k < K; k++) begin rsum[k] = '0; rcnt[k] = 0; end
      end
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        acc_en  = ($urandom % 4) != 0;
        acc_idx = ($urandom % 3 == 0) ? acc_idx : 5'($urandom);
        acc_p   = '{x: rand_f(-6, 6), y: rand_f(-6, 6)};
        if (acc_en) begin
          rsum[acc_idx].x = r_add(rsum[acc_idx].x, acc_p.x);
          rsum[acc_idx].y = r_add(rsum[acc_idx].y, acc_p.y);
          rcnt[acc_idx]++;
        end
      end
      @(negedge clk); acc_en = 1'b0;
      for (int ch = 0; ch < 2; ch++) begin
        rd_chunk = 1'(ch);
        #1;
        for (int l = 0; l < LANES; l++) begin
          checks++;
          if (rd_sum[l] !== rsum[ch*16+l] || rd_cnt[l] !== rcnt[ch*16+l]) begin
            failures++;
            if (failures < 10)
              $display("FAIL cluster %0d got %h/%0d exp %h/%0d", ch*16+l,
                       rd_sum[l], rd_cnt[l], rsum[ch*16+l], rcnt[ch*16+l]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
