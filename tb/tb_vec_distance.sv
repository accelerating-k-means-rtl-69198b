// Self-checking test of the 16-lane vector distance unit. A random point is
// measured against 16 random centres; every lane must equal the reference
// squared distance with each operation rounded to fp32. Coordinates cover
// close pairs (cancellation), distant pairs and exact coincidences (distance
// zero).
module tb_vec_distance;
  import kmeans_pkg::*;
  import fp_ref_pkg::*;

  int checks = 0, failures = 0;
  point_t               p;
  point_t [LANES-1:0]   c;
  fp32_t  [LANES-1:0]   d;

  vec_distance dut (.p, .c, .d);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      p.x = rand_f(-4, 10);
      p.y = rand_f(-4, 10);
      for (int l = 0; l < LANES; l++) begin
        case ($urandom % 4)
          0: c[l] = p;                                              // same point
          1: c[l] = '{x: p.x ^ 32'($urandom % 64), y: p.y ^ 32'($urandom % 64)};
          default: c[l] = '{x: rand_f(-4, 10), y: rand_f(-4, 10)};
        endcase
      end
      #1;
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (d[l] !== r_sqdist(p.x, p.y, c[l].x, c[l].y)) begin
          failures++;
          if (failures < 10)
            $display("FAIL lane %0d p=%h c=%h got=%h exp=%h", l, p, c[l], d[l],
                     r_sqdist(p.x, p.y, c[l].x, c[l].y));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
