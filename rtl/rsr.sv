// rsr -- reconfigurable right shift register of the trace-back unit.
//
// Holds the current trellis state S_t of the trace-back and moves it one
// stage back per enabled clock:  S_{t-1} = {d_t, S_t[K-2:1]}, a right shift
// of a (K-1)-bit register with the surviving decision bit d_t entering the
// vacant MSB.  Because K-1 varies from 2 to 8, the register is a fixed chain
// of KM-1 flip-flops (MSB on the left, LSB on the right) in which seven
// 2-to-1 multiplexers, controlled by one-hot configuration bits C1..C7,
// select where d_t is inserted.  Flip-flop i (i = 1 is the MSB, bit KM-2)
// loads d_t when C_i is set, otherwise the content of flip-flop i-1; the
// first multiplexer's other input is 0 and the last flip-flop has no
// multiplexer.  For constraint length K, C_(KM+1-K) is set, so d_t lands in
// bit K-2 and the bits above it stay 0.  This structure follows the design.
//
// `clr` (synchronous, priority over `en`) sets the state to 0, the known
// end state of a zero-terminated frame; it and `en` are this design's
// additions.  Reset is asynchronous, active low.  The state is visible on
// `s` one clock after the shift.
module rsr
  import viterbi_pkg::*;
#(
  parameter int unsigned KM = K_MAX
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en,
  input  logic [KM-2:1] c,      // c[i] is configuration bit C_i
  input  logic          d,      // surviving decision bit d_t
  output logic [KM-2:0] s       // current state, bit KM-2 is the MSB
);

  // ff[i], i = 1..KM-1, is flip-flop i counted from the MSB; s[KM-1-i] = ff[i]
  logic [KM-1:1] ff, ff_next;

  always_comb begin
    ff_next[1] = c[1] ? d : 1'b0;
    for (int i = 2; i <= int'(KM) - 2; i++)
      ff_next[i] = c[i] ? d : ff[i-1];
    ff_next[KM-1] = ff[KM-2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   ff <= '0;
    else if (clr) ff <= '0;
    else if (en)  ff <= ff_next;
  end

  for (genvar i = 1; i <= int'(KM) - 1; i++) begin : g_out
    assign s[KM-1-i] = ff[i];
  end

endmodule
