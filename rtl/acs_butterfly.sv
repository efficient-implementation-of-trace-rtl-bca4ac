// acs_butterfly -- two add-compare-select operations sharing one pair of
// predecessor states (a radix-2 butterfly).
//
// Butterfly m (0 <= m < 2^(K-2)) of a constraint-length-K trellis reads the
// path metrics of predecessor states j0 = m and j1 = m + 2^(K-2), i.e. the
// (K-1)-bit states {0,m} and {1,m}, and produces the metrics of the successor
// states i0 = 2m and i1 = 2m+1, i.e. {m,0} and {m,1}.  For each of the four
// transitions the expected codeword is looked up from the configured
// generator polynomials (the encoder register word is {j, u}, u being the
// input bit), the matching branch metric is selected from the BMU's table and
// added to the predecessor metric; the smaller sum survives.  The decision
// bit is 1 when the survivor comes from j1 (the decision bit is the bit that
// re-enters the MSB during trace-back), 0 on a tie or when j0 wins.
//
// Path metrics are compared modulo 2^PW (sign of the difference), so no
// normalisation is needed as long as the metric spread stays below 2^(PW-1).
// Combinational; the registers live in the ACS array.  Combining two ACS
// into a butterfly and fitting constraint lengths with multiplexers and
// look-up logic follow the design; the metric arithmetic is this design's.
module acs_butterfly
  import viterbi_pkg::*;
#(
  parameter int unsigned KM = K_MAX,
  parameter int unsigned PW = PM_W,
  parameter int unsigned BW = BM_W
) (
  input  logic [KM-2:0]           m,        // butterfly index
  input  logic [3:0]              k,        // constraint length
  input  logic [R_MAX-1:0][KM-1:0] poly,    // generator polynomials
  input  logic [7:0][BW-1:0]      bm,       // branch metric per codeword
  input  logic [PW-1:0]           pm_j0,    // metric of state {0,m}
  input  logic [PW-1:0]           pm_j1,    // metric of state {1,m}
  output logic [PW-1:0]           pm_i0,    // new metric of state {m,0}
  output logic [PW-1:0]           pm_i1,    // new metric of state {m,1}
  output logic                    d_i0,     // decision of state {m,0}
  output logic                    d_i1      // decision of state {m,1}
);

  logic [KM-2:0] j1;
  logic [1:0][1:0][2:0] cw;        // cw[pred][u]: codeword of a transition
  logic [1:0][1:0][PW-1:0] cand;   // cand[pred][u]: candidate metric
  logic [1:0][PW-1:0]      diff;   // diff[u] = cand[0][u] - cand[1][u]
  logic [KM-1:0]           r;      // encoder register word of a transition

  always_comb begin
    j1 = m | ((KM-1)'(1) << (k - 4'd2));
    for (int p = 0; p < 2; p++) begin
      for (int u = 0; u < 2; u++) begin
        r = {(p == 0) ? m : j1, 1'(u)};
        for (int n = 0; n < int'(R_MAX); n++)
          cw[p][u][n] = ^(r & poly[n]);
        cand[p][u] = ((p == 0) ? pm_j0 : pm_j1) + PW'(bm[cw[p][u]]);
      end
    end
    // survivor from j1 when cand[1] < cand[0] (modulo comparison)
    for (int u = 0; u < 2; u++)
      diff[u] = cand[0][u] - cand[1][u];
    d_i0  = (diff[0] != '0) && !diff[0][PW-1];
    d_i1  = (diff[1] != '0) && !diff[1][PW-1];
    pm_i0 = d_i0 ? cand[1][0] : cand[0][0];
    pm_i1 = d_i1 ? cand[1][1] : cand[0][1];
  end

endmodule
