// Nearest-centre selection (Min_Dist).
//
// Takes LANES squared distances with a mask of lanes that hold a real centre
// and returns the smallest masked distance and its lane. Distances are never
// negative, so their fp32 bit patterns are compared as unsigned integers.
// On a tie the lower lane wins. A reduction tree of log2(LANES) compare
// levels, combinational. `any` is low when no lane is masked in. The tree
// and the tie rule are this design's choices.
module min_dist
  import kmeans_pkg::*;
#(
  parameter int unsigned LANES_P = LANES
)(
  input  fp32_t [LANES_P-1:0]     d,
  input  logic  [LANES_P-1:0]     en,
  output fp32_t                   dmin,
  output logic [$clog2(LANES_P)-1:0] idx,
  output logic                    any
);

  localparam int unsigned LV  = $clog2(LANES_P);
  localparam int unsigned PW  = 1 << LV;
  localparam int unsigned IW  = (LV > 0) ? LV : 1;

  typedef struct packed {
    logic          v;
    fp32_t         d;
    logic [IW-1:0] i;
  } cand_t;

  always_comb begin
    cand_t t [PW];
    for (int l = 0; l < PW; l++) begin
      if (l < LANES_P) t[l] = '{v: en[l], d: d[l], i: IW'(l)};
      else             t[l] = '{v: 1'b0, d: '0, i: '0};
    end
    for (int s = 1; s < PW; s = s * 2) begin
      for (int l = 0; l + s < PW; l += 2 * s) begin
        // t[l] holds the lower lanes: it wins ties
        if (!t[l].v || (t[l + s].v && fp32_pos_lt(t[l + s].d, t[l].d)))
          t[l] = t[l + s];
      end
    end
    dmin = t[0].d;
    idx  = t[0].i[$clog2(LANES_P)-1:0];
    any  = t[0].v;
  end

endmodule
