// tbu -- trace-back unit.
//
// Walks the survivor path backwards through the stored decision vectors.
// Each cycle with `dv_valid` high, `dv` is the decision vector of stage t
// (bit i belongs to state i) and the reconfigurable right shift register
// holds S_t.  The unit then
//   * emits the decoded bit of stage t, which is the LSB of S_t
//     (out_valid = dv_valid, combinational), and
//   * selects d_t = dv[S_t] and shifts it into the register, giving S_{t-1}
//     for the next vector.
// `clr` starts a trace-back from state 0.  Decision vectors must arrive in
// descending stage order; in the decoder the controller reads decision
// memory newest stage first.  The recursion follows the design; the interface is this design's.
module tbu
  import viterbi_pkg::*;
#(
  parameter int unsigned KM = K_MAX
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clr,
  input  logic [KM-2:1]          c,          // shift register configuration
  input  logic                   dv_valid,
  input  logic [(1<<(KM-1))-1:0] dv,
  output logic                   out_valid,
  output logic                   out_bit,
  output logic [KM-2:0]          state
);

  logic d_t;

  assign d_t       = dv[state];
  assign out_valid = dv_valid;
  assign out_bit   = state[0];

  rsr #(.KM(KM)) u_rsr (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (clr),
    .en    (dv_valid),
    .c     (c),
    .d     (d_t),
    .s     (state)
  );

endmodule
