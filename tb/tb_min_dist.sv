// Self-checking test of the nearest-centre selector. Random non-negative
// distances (drawn from a small set so that ties are frequent) and random
// lane masks are compared with a linear search that keeps the first lane of
// the smallest masked distance.
module tb_min_dist;
  import kmeans_pkg::*;
  import fp_ref_pkg::*;

  int checks = 0, failures = 0;
  fp32_t [LANES-1:0] d;
  logic  [LANES-1:0] en;
  fp32_t             dmin;
  logic  [3:0]       idx;
  logic              any;

  min_dist dut (.d, .en, .dmin, .idx, .any);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp32_t pool [8];
    for (int i = 0; i < 8; i++) pool[i] = {1'b0, rand_f(-10, 10)} & 32'h7FFF_FFFF;
    pool[0] = 32'h0;
    pool[7] = 32'h7F80_0000;     // +infinity
    for (int i = 0; i < 20000; i++) begin
      int    bi;
      fp32_t bd;
      logic  ba;
      for (int l = 0; l < LANES; l++)
        d[l] = (i % 2) ? pool[$urandom % 8] : ({1'b0, rand_f(-30, 30)} & 32'h7FFF_FFFF);
      case (i % 5)
        0: en = '1;
        1: en = '0;
        2: en = LANES'(16'hFFFF >> ($urandom % 16));   // first K lanes
        default: en = LANES'($urandom);
      endcase
      #1;
      ba = 1'b0; bi = 0; bd = '0;
      for (int l = 0; l < LANES; l++)
        if (en[l] && (!ba || d[l] < bd)) begin ba = 1'b1; bi = l; bd = d[l]; end
      checks++;
      if (any !== ba || (ba && (idx !== 4'(bi) || dmin !== bd))) begin
        failures++;
        if (failures < 10)
          $display("FAIL en=%h got any=%0b idx=%0d d=%h exp any=%0b idx=%0d d=%h",
                   en, any, idx, dmin, ba, bi, bd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
