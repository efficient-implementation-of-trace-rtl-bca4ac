// vd_ctrl -- frame controller of the Viterbi decoder fabric.
//
// Decodes a stream of zero-terminated frames of L = frame_len trellis
// stages each (the last k-1 input bits of every frame are the encoder's zero
// tail).  Three engines work on three consecutive frames at once:
//   ACS : accepts one symbol per cycle whenever offered (sym_ready is always
//         high) and writes each stage's decision vector to decision memory.
//         The last stage of a frame re-initialises the path metrics.
//   TB  : starts the cycle after the ACS engine finishes a frame and reads
//         that frame's L vectors newest first, one per cycle; the trace-back
//         unit (cleared to state 0 on the first read) emits stages L-1..0.
//         The k-1 tail bits are dropped and the L-k+1 data bits written to
//         the output buffer.
//   OUT : starts when the last trace-back bit of a frame has been written
//         and reads the frame's data bits from the output buffer in time
//         order, one per cycle, flagging the last with out_last.
// Both memories are used in addressed (RAM) mode through their address
// generators.  Frames are written in alternating directions: even frames
// at addresses 0..L-1 upwards, odd frames from L-1 downwards.  Reading frame
// n newest first therefore visits the addresses in exactly the order in
// which frame n+1 is written, so the trace-back of frame n reads each word
// in the same cycle as (or before) the ACS engine overwrites it, and one
// 64-word memory suffices for two frames in flight (the RAMs return the
// old word on a read-during-write).  The output buffer alternates the same
// way (data bits at 0..L-k), and reading frame n in time order stays ahead
// of the trace-back writing frame n+1.  No engine ever has to wait.
//
// Timing: the first decoded bit of a frame appears 2L+2 cycles after its
// first symbol is accepted, the last one 3L-k+2 cycles after; with symbols
// offered back to back a frame is decoded every L cycles, i.e. L-k+1 bits
// per L clocks.  There is no output back-pressure.  busy covers any frame in
// flight; configuration must only change while busy is low and no symbol is
// offered.  The alternating-direction scheme, the frames and the engine
// structure are this design's choices; the use of the address generators'
// load, initial address and add/subtract controls follows the design's
// memory unit.
module vd_ctrl
  import viterbi_pkg::*;
#(
  parameter int unsigned AW = $clog2(RAM_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       k,
  input  logic [LEN_W-1:0] frame_len,
  // symbol input
  input  logic             sym_valid,
  output logic             sym_ready,
  // ACS array
  output logic             acs_init,
  output logic             acs_step,
  // decision memory
  output logic             dec_wr,
  output logic             dec_w_load,
  output logic [AW-1:0]    dec_w_addr0,
  output logic             dec_w_up,
  output logic             dec_rd,
  output logic             dec_r_load,
  output logic [AW-1:0]    dec_r_addr0,
  output logic             dec_r_up,
  input  logic             dec_rvalid,
  // trace-back unit
  output logic             tbu_clr,
  // output buffer
  output logic             ob_wr,
  output logic             ob_w_load,
  output logic [AW-1:0]    ob_w_addr0,
  output logic             ob_w_up,
  output logic             ob_rd,
  output logic             ob_r_load,
  output logic [AW-1:0]    ob_r_addr0,
  output logic             ob_r_up,
  input  logic             ob_rvalid,
  // decoded bits
  output logic             out_valid,
  output logic             out_last,
  output logic             busy
);

  logic [LEN_W-1:0] a_cnt, t_cnt, r_cnt, o_cnt, q_cnt;
  logic             a_par, t_par, r_par, o_par;
  logic             t_act, o_act;
  logic             accept, a_last, r_end, idle;
  logic [AW-1:0]    l_top, d_top;   // L-1 and L-k: top word of a frame
  logic [LEN_W-1:0] n_data;

  assign n_data = frame_len - LEN_W'(k) + LEN_W'(1);
  assign l_top  = AW'(frame_len - LEN_W'(1));
  assign d_top  = AW'(frame_len - LEN_W'(k));

  always_comb begin
    busy      = (a_cnt != '0) || t_act || dec_rvalid || o_act || ob_rvalid;
    sym_ready = 1'b1;
    accept    = sym_valid;
    a_last    = accept && (a_cnt == frame_len - LEN_W'(1));
    idle      = !busy && !accept;
    r_end     = dec_rvalid && (r_cnt == frame_len - LEN_W'(1));

    // ACS engine and decision-memory write port
    acs_step    = accept && !a_last;
    acs_init    = a_last;
    dec_wr      = accept;
    dec_w_up    = !a_par;
    dec_w_load  = a_last || idle;
    dec_w_addr0 = (a_last && !a_par) ? l_top : '0;   // next frame's first word

    // trace-back engine and decision-memory read port
    dec_rd      = t_act;
    dec_r_load  = a_last;
    dec_r_addr0 = a_par ? '0 : l_top;                // this frame's last word
    dec_r_up    = t_par;
    tbu_clr     = t_act && (t_cnt == '0);

    // trace-back results into the output buffer
    ob_wr      = dec_rvalid && (r_cnt >= LEN_W'(k) - LEN_W'(1));
    ob_w_up    = !r_par;
    ob_w_load  = r_end || idle;
    ob_w_addr0 = (r_end && !r_par) ? d_top : '0;

    // output engine
    ob_rd      = o_act;
    ob_r_load  = r_end;
    ob_r_addr0 = r_par ? '0 : d_top;
    ob_r_up    = o_par;
    out_valid  = ob_rvalid;
    out_last   = ob_rvalid && (q_cnt == n_data - LEN_W'(1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_cnt <= '0;  a_par <= 1'b0;
      t_act <= 1'b0; t_cnt <= '0; t_par <= 1'b0;
      r_cnt <= '0;  r_par <= 1'b0;
      o_act <= 1'b0; o_cnt <= '0; o_par <= 1'b0;
      q_cnt <= '0;
    end else begin
      // ACS
      if (idle) begin
        a_par <= 1'b0;
        r_par <= 1'b0;
      end
      if (a_last) begin
        a_cnt <= '0;
        a_par <= !a_par;
      end else if (accept) begin
        a_cnt <= a_cnt + LEN_W'(1);
      end
      // trace-back reads
      if (a_last) begin
        t_act <= 1'b1;
        t_cnt <= '0;
        t_par <= a_par;
      end else if (t_act) begin
        if (t_cnt == frame_len - LEN_W'(1)) t_act <= 1'b0;
        else t_cnt <= t_cnt + LEN_W'(1);
      end
      // trace-back results
      if (r_end) begin
        r_cnt <= '0;
        r_par <= !r_par;
      end else if (dec_rvalid) begin
        r_cnt <= r_cnt + LEN_W'(1);
      end
      // output reads
      if (r_end) begin
        o_act <= 1'b1;
        o_cnt <= '0;
        o_par <= r_par;
      end else if (o_act) begin
        if (o_cnt == n_data - LEN_W'(1)) o_act <= 1'b0;
        else o_cnt <= o_cnt + LEN_W'(1);
      end
      // output results
      if (out_last)       q_cnt <= '0;
      else if (ob_rvalid) q_cnt <= q_cnt + LEN_W'(1);
    end
  end

  // a new trace-back never starts before the previous one has issued all
  // its reads, and a new output run never before the previous one
  a_tb_free: assert property (@(posedge clk) disable iff (!rst_n)
    a_last |-> (!t_act || t_cnt == frame_len - LEN_W'(1)));
  a_out_free: assert property (@(posedge clk) disable iff (!rst_n)
    r_end |-> (!o_act || o_cnt == n_data - LEN_W'(1)));

endmodule
