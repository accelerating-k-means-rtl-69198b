// Self-checking test of the fp32 arithmetic helpers: adder, multiplier,
// sequential divider and unsigned-to-fp32 conversion, against the double-
// precision reference of fp_ref_pkg. Random operands span close and distant
// exponents (so both alignment and cancellation paths are taken), plus zero,
// equal-magnitude opposite-sign and rounding-tie cases. The divider's
// latency is checked to be 30 clocks from start to done.
module tb_fp32_ops;
  import kmeans_pkg::*;
  import fp_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  fp32_t a, b, ys, yp, yd, yc;
  logic  dstart, dbusy, ddone;
  logic [31:0] u;

  fp32_add    u_add (.a, .b, .y(ys));
  fp32_mul    u_mul (.a, .b, .y(yp));
  fp32_div    u_div (.clk, .rst_n, .start(dstart), .a, .b, .busy(dbusy), .done(ddone), .y(yd));
  u32_to_fp32 u_cvt (.u, .y(yc));

  task automatic check(string what, fp32_t got, fp32_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%h b=%h u=%0d got=%h exp=%h", what, a, b, u, got, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    dstart = 1'b0; a = '0; b = '0; u = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // combinational units
    for (int i = 0; i < 20000; i++) begin
      case (i % 4)
        0: begin a = rand_f(-20, 20); b = rand_f(-20, 20); end
        1: begin a = rand_f(0, 3);    b = rand_f(0, 3);    end
        2: begin a = rand_f(-5, 5);   b = {~a[31], a[30:0]} ^ 32'(($urandom & 3)); end
        default: begin a = rand_f(0, 0); b = (i % 8 == 3) ? 32'h0 : rand_f(-24, -23); end
      endcase
      u = (i % 3 == 0) ? $urandom : ($urandom >> ($urandom % 32));
      #1;
      check("add", ys, r_add(a, b));
      check("mul", yp, r_mul(a, b));
      check("cvt", yc, f_round(real'(u)));
    end
    // divider, with latency
    for (int i = 0; i < 400; i++) begin
      a = (i % 20 == 0) ? 32'h0 : rand_f(-10, 20);
      b = rand_f(0, 12);
      @(negedge clk); dstart = 1'b1;
      @(negedge clk); dstart = 1'b0;
      lat = 1;
      while (!ddone) begin @(negedge clk); lat++; end
      check("div", yd, r_div(a, b));
      checks++;
      if (lat != 30) begin failures++; $display("FAIL div latency %0d", lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
