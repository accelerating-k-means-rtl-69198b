// Sequential IEEE-754 single-precision divider (a / b), one quotient bit
// per clock.
//
// The data collector uses it to turn a cluster's coordinate sum into a mean.
// A pulse on `start` loads the operands at a rising edge; the next 28 edges
// run the restoring division of the mantissas, the one after that normalises
// and rounds to nearest-even, and `done` is then high for one cycle with `y`
// valid (held until the next start): done follows start by 30 clocks. A zero dividend gives zero; a zero divisor gives infinity.
// Subnormal operands read as zero and subnormal results flush to zero. The
// iterative structure and its latency are this design's choices.
module fp32_div
  import kmeans_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp32_t a,
  input  fp32_t b,
  output logic  busy,
  output logic  done,
  output fp32_t y
);

  localparam int unsigned QBITS = 28;

  logic        sign_q;
  logic [9:0]  exp_q;              // biased exponent, two's complement
  logic [24:0] rem_q;
  logic [23:0] div_q;
  logic [QBITS-1:0] quo_q;
  logic [4:0]  cnt_q;
  logic        run_q, fin_q, special_q;
  fp32_t       special_y_q;

  // result rounding, from the finished quotient
  fp32_t y_calc;
  always_comb begin
    logic [24:0] rnd;
    logic        g, st;
    logic [9:0]  e;
    e = exp_q;
    if (quo_q[QBITS-1]) begin
      rnd = {1'b0, quo_q[QBITS-1 -: 24]};
      g   = quo_q[3];
      st  = (|quo_q[2:0]) || (rem_q != 25'd0);
    end else begin
      rnd = {1'b0, quo_q[QBITS-2 -: 24]};
      g   = quo_q[2];
      st  = (|quo_q[1:0]) || (rem_q != 25'd0);
      e   = e - 10'd1;
    end
    if (g && (st || rnd[0])) rnd = rnd + 25'd1;
    if (rnd[24]) begin
      rnd = rnd >> 1;
      e   = e + 10'd1;
    end
    if (e[9] || e == 10'd0) y_calc = {sign_q, 31'd0};
    else if (e >= 10'd255)  y_calc = {sign_q, 8'hFF, 23'd0};
    else                    y_calc = {sign_q, e[7:0], rnd[22:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sign_q <= 1'b0; exp_q <= '0; rem_q <= '0; div_q <= '0; quo_q <= '0;
      cnt_q <= '0; run_q <= 1'b0; fin_q <= 1'b0; special_q <= 1'b0;
      special_y_q <= '0; done <= 1'b0; y <= '0;
    end else begin
      done  <= 1'b0;
      fin_q <= 1'b0;
      if (start) begin
        sign_q    <= a[31] ^ b[31];
        exp_q     <= {2'b00, a[30:23]} - {2'b00, b[30:23]} + 10'd127;
        rem_q     <= {1'b0, 1'b1, a[22:0]};
        div_q     <= {1'b1, b[22:0]};
        quo_q     <= '0;
        cnt_q     <= '0;
        special_q <= 1'b0;
        run_q     <= 1'b1;
        if (a[30:23] == 8'd0 || b[30:23] == 8'hFF) begin
          special_q <= 1'b1; special_y_q <= {a[31] ^ b[31], 31'd0};
        end else if (b[30:23] == 8'd0 || a[30:23] == 8'hFF) begin
          special_q <= 1'b1; special_y_q <= {a[31] ^ b[31], 8'hFF, 23'd0};
        end
      end else if (run_q) begin
        if (rem_q >= {1'b0, div_q}) begin
          rem_q <= (rem_q - {1'b0, div_q}) << 1;
          quo_q <= {quo_q[QBITS-2:0], 1'b1};
        end else begin
          rem_q <= rem_q << 1;
          quo_q <= {quo_q[QBITS-2:0], 1'b0};
        end
        cnt_q <= cnt_q + 5'd1;
        if (cnt_q == 5'(QBITS - 1)) begin
          run_q <= 1'b0;
          fin_q <= 1'b1;
        end
      end else if (fin_q) begin
        y    <= special_q ? special_y_q : y_calc;
        done <= 1'b1;
      end
    end
  end

  assign busy = run_q | fin_q;

endmodule
