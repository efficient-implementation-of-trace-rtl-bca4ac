// tb_vd_ctrl -- frame controller with behavioural memories around it.
//
// Both memories are modelled here: a 64-word array per memory, a write and
// a read pointer with the address generators' behaviour (load has
// priority, otherwise each access steps the pointer up or down), one cycle
// of read latency, and the old word returned on a read-during-write.
// Instead of decision vectors the ACS writes carry tags (frame, stage), and
// the trace-back results written to the output buffer carry the stage they
// came from.  For random k and frame lengths, bursts of frames with and
// without gaps in the symbol stream are run, and the test checks that
//   * the ACS array steps on every symbol and re-initialises on the last
//     symbol of each frame;
//   * trace-back reads return every frame's own words, newest stage first
//     (so no word is overwritten before it is read), with the trace-back
//     clear on the first read of each frame;
//   * the output buffer returns stages 0..L-k of each frame in order, with
//     out_last on the last;
//   * with symbols back to back, frames complete exactly L cycles apart.
module automatic tb_vd_ctrl;
  import viterbi_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [3:0] k;
  logic [LEN_W-1:0] frame_len;
  logic sym_valid = 0, sym_ready;
  logic acs_init, acs_step;
  logic dec_wr, dec_w_load, dec_w_up, dec_rd, dec_r_load, dec_r_up;
  logic [5:0] dec_w_addr0, dec_r_addr0;
  logic dec_rvalid = 0;
  logic tbu_clr;
  logic ob_wr, ob_w_load, ob_w_up, ob_rd, ob_r_load, ob_r_up;
  logic [5:0] ob_w_addr0, ob_r_addr0;
  logic ob_rvalid = 0;
  logic out_valid, out_last, busy;
  int checks = 0, failures = 0;

  vd_ctrl dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  // ------------------------------------------------ behavioural memories
  int dmem[64], omem[64];
  int dwp = 0, drp = 0, owp = 0, orp = 0;
  int drdata = 0, ordata = 0;
  int cur_tag = 0;             // tag of the symbol being accepted
  int tb_stage;                // stage carried by the current trace-back result

  always @(posedge clk) begin
    // reads first (old data on collision)
    if (dec_rd) drdata <= dmem[drp];
    if (ob_rd)  ordata <= omem[orp];
    dec_rvalid <= dec_rd;
    ob_rvalid  <= ob_rd;
    if (dec_wr) dmem[dwp] = cur_tag;
    if (ob_wr)  omem[owp] = tb_stage;
    dwp = dec_w_load ? int'(dec_w_addr0) : dec_wr ? (dwp + (dec_w_up ? 1 : 63)) % 64 : dwp;
    drp = dec_r_load ? int'(dec_r_addr0) : dec_rd ? (drp + (dec_r_up ? 1 : 63)) % 64 : drp;
    owp = ob_w_load  ? int'(ob_w_addr0)  : ob_wr  ? (owp + (ob_w_up  ? 1 : 63)) % 64 : owp;
    orp = ob_r_load  ? int'(ob_r_addr0)  : ob_rd  ? (orp + (ob_r_up  ? 1 : 63)) % 64 : orp;
  end
  assign tb_stage = drdata % 64;

  initial begin
    k = 4'd3; frame_len = 7'd16;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 40; b++) begin
      int kk = $urandom_range(3, 9);
      int L = $urandom_range(kk, 64);
      int nf = $urandom_range(1, 5);
      bit gaps = 1'($urandom);
      int nd = L - kk + 1;
      int a_f = 0, a_s = 0, tb_f = 0, tb_r = 0, o_f = 0, o_j = 0;
      longint cyc = 0, last_done = -1;
      bit period_ok = 1, step_ok = 1, tb_ok = 1, clr_ok = 1, out_ok = 1;
      k = 4'(kk); frame_len = 7'(L);
      @(negedge clk);
      chk(!busy, "idle between bursts");
      while (o_f < nf) begin
        sym_valid = (a_f < nf) && (!gaps || $urandom_range(0, 3) != 0);
        cur_tag = (a_f % 16) * 64 + a_s;
        #1;
        // ACS
        if (sym_valid) begin
          bit last = (a_s == L - 1);
          if (acs_step != !last || acs_init != last || !dec_wr) step_ok = 0;
        end else if (acs_step || acs_init || dec_wr) step_ok = 0;
        // trace-back clear on the first read of every frame
        if (tbu_clr != (dec_rd && (dut.t_cnt == 0))) clr_ok = 0;
        // trace-back results: frame tb_f, stage L-1-tb_r
        if (dec_rvalid) begin
          if (drdata != (tb_f % 16) * 64 + (L - 1 - tb_r)) tb_ok = 0;
          if (ob_wr != (tb_r >= kk - 1)) tb_ok = 0;
          tb_r++;
          if (tb_r == L) begin tb_r = 0; tb_f++; end
        end
        // output
        if (out_valid) begin
          if (ordata != o_j) out_ok = 0;
          if (out_last != (o_j == nd - 1)) out_ok = 0;
          o_j++;
          if (o_j == nd) begin
            o_j = 0; o_f++;
            if (!gaps && last_done >= 0 && cyc - last_done != L) period_ok = 0;
            last_done = cyc;
          end
        end
        @(posedge clk);
        if (sym_valid) begin
          a_s++;
          if (a_s == L) begin a_s = 0; a_f++; end
        end
        @(negedge clk);
        cyc++;
        if (cyc > 2000) break;
      end
      sym_valid = 0;
      chk(step_ok, $sformatf("ACS step/init k=%0d L=%0d", kk, L));
      chk(clr_ok, "trace-back clear");
      chk(tb_ok && tb_f == nf, $sformatf("trace-back order k=%0d L=%0d nf=%0d", kk, L, nf));
      chk(out_ok && o_f == nf, $sformatf("output order k=%0d L=%0d", kk, L));
      chk(period_ok, $sformatf("frame period k=%0d L=%0d", kk, L));
      repeat (2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
