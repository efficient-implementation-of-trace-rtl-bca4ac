// bmu -- branch metric unit.
//
// Computes, for one trellis stage, the distance between the received soft
// symbols and every codeword the encoder could have sent.  A soft symbol is
// an unsigned SOFT_W-bit value: 0 is a confident '0', 2^SOFT_W-1 a confident
// '1'.  The distance of a symbol r to bit 0 is r, to bit 1 it is
// (2^SOFT_W-1) - r.
//
// As the design prescribes, the rate-1/3 metrics are not built by a second
// circuit: the rate-1/2 metrics of symbols 0 and 1 (four values) are always
// formed, and for rate 1/3 the distance of symbol 2 is added to them to give
// the eight rate-1/3 metrics.  At rate 1/2 the entries with codeword bit 2
// set simply repeat the entries without it.  bm[c] is indexed by the
// codeword c = {c2, c1, c0}, c_n being the bit expected on symbol n.
//
// Purely combinational; the result is consumed by the ACS array in the same
// cycle.  The soft-decision metric itself is this design's choice.
module bmu
  import viterbi_pkg::*;
#(
  parameter int unsigned SW = SOFT_W
) (
  input  logic [R_MAX-1:0][SW-1:0] sym,
  input  logic                     rate3,
  output logic [7:0][SW+1:0]       bm
);

  localparam logic [SW-1:0] SMAX = {SW{1'b1}};

  logic [R_MAX-1:0][1:0][SW-1:0] sdist;   // sdist[n][b]: symbol n against bit b
  logic [3:0][SW:0]              bm2;    // rate-1/2 metrics, shared by both rates

  always_comb begin
    for (int n = 0; n < int'(R_MAX); n++) begin
      sdist[n][0] = sym[n];
      sdist[n][1] = SMAX - sym[n];
    end
    for (int c = 0; c < 4; c++)
      bm2[c] = (SW+1)'(sdist[0][c[0]]) + (SW+1)'(sdist[1][c[1]]);
    for (int c = 0; c < 8; c++)
      bm[c] = (SW+2)'(bm2[c[1:0]]) + (rate3 ? (SW+2)'(sdist[2][c[2]]) : '0);
  end

endmodule
