// Reference model of one accelerator iteration for the end-to-end tests.
//
// ref_iteration follows the dispatch rule (vector v of 16 points goes to
// tile v mod n_tiles), assigns each real point to its nearest centre by fp32
// squared distance with the lowest index winning ties, accumulates per tile
// in point order, adds the tiles in order and divides by the counts with
// correct rounding; a centre without points keeps its place. All fp32
// operations come from fp_ref_pkg, not from the RTL.
package kmeans_ref_pkg;
  import kmeans_pkg::*;
  import fp_ref_pkg::*;

  localparam int MAXT = 64;

  function automatic void ref_iteration(input point_t C[32], input point_t P[$],
                                        input int K, input int NP, input int n_tiles,
                                        output point_t E[32]);
    point_t tsum[MAXT][32], esum[32];
    int     tcnt[MAXT][32], ecnt[32];
    int     vpt;
    vpt = (NP + 16 * n_tiles - 1) / (16 * n_tiles);
    for (int t = 0; t < n_tiles; t++)
      for (int k = 0; k < 32; k++) begin tsum[t][k] = '0; tcnt[t][k] = 0; end
    for (int v = 0; v < vpt * n_tiles; v++)
      for (int l = 0; l < 16; l++) begin
        int i = v * 16 + l;
        int t = v % n_tiles;
        int bk; fp32_t bd, d;
        if (i >= NP) continue;
        bk = 0; bd = '0;
        for (int k = 0; k < K; k++) begin
          d = r_sqdist(P[i].x, P[i].y, C[k].x, C[k].y);
          if (k == 0 || d < bd) begin bk = k; bd = d; end
        end
        tsum[t][bk].x = r_add(tsum[t][bk].x, P[i].x);
        tsum[t][bk].y = r_add(tsum[t][bk].y, P[i].y);
        tcnt[t][bk]++;
      end
    for (int k = 0; k < 32; k++) begin esum[k] = '0; ecnt[k] = 0; end
    for (int t = 0; t < n_tiles; t++)
      for (int k = 0; k < K; k++) begin
        esum[k].x = r_add(esum[k].x, tsum[t][k].x);
        esum[k].y = r_add(esum[k].y, tsum[t][k].y);
        ecnt[k] += tcnt[t][k];
      end
    for (int k = 0; k < 32; k++) begin
      if (k >= K || ecnt[k] == 0) E[k] = C[k];
      else begin
        fp32_t n;
        n = f_round(real'(ecnt[k]));
        E[k] = '{x: r_div(esum[k].x, n), y: r_div(esum[k].y, n)};
      end
    end
  endfunction

endpackage
