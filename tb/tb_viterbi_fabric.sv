// tb_viterbi_fabric -- end-to-end test of the Viterbi decoder fabric at its
// default size (K up to 9, 256 states, 64-stage decision memory).
//
// For every constraint length 3..9 and both rates the test configures the
// fabric and streams bursts of random zero-terminated frames, encoded by a
// behavioural convolutional encoder and turned into 3-bit soft symbols.
// Each decoded frame is compared bit by bit with
//   * an independent reference Viterbi decoder written here with plain
//     integer metrics (exact comparison, any noise level), and
//   * the transmitted data bits, for frames whose channel errors are
//     spaced widely enough to be correctable.
// It also checks the timing: with symbols back to back, the last bit of the
// first frame 3L-k+2 cycles after its first symbol and one frame every L
// cycles after that.  It counts the mechanisms of the design and fails if
// one never occurred: trace-back of one frame overlapping the ACS of the
// next, a decision word read in the same cycle as it is overwritten, the
// output of one frame overlapping the trace-back of the next, unused
// decision RAMs left unclocked, configuration writes refused while busy or
// when illegal, stalls of the ACS array on missing symbols, and corrected
// channel errors.
module automatic tb_viterbi_fabric;
  import viterbi_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic cfg_we = 1'b0;
  cfg_t cfg_wdata;
  logic sym_valid = 1'b0;
  logic sym_ready;
  logic [R_MAX-1:0][SOFT_W-1:0] sym_data;
  logic out_valid, out_bit, out_last, busy;

  int checks = 0, failures = 0;
  longint cycle = 0;

  // mechanism counters
  int n_k[K_MAX+1];
  int n_rate[2];
  int n_corrected = 0;     // frames with channel errors decoded error-free
  int n_gated = 0;         // bursts in which some decision RAMs were unclocked
  int n_busy_reject = 0;   // configuration writes ignored while busy
  int n_illegal_reject = 0;
  int n_stall = 0;         // cycles the ACS array waited for a symbol
  int n_latency = 0;       // latency measurements
  int n_period = 0;        // frame-period measurements
  int n_tb_overlap = 0;    // cycles with ACS writing and trace-back reading
  int n_same_word = 0;     // decision word read while being overwritten
  int n_out_overlap = 0;   // cycles with output and trace-back both active

  viterbi_fabric dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- model
  localparam int MAXF = 6;
  int unsigned cur_k;
  bit          cur_rate3;
  logic [R_MAX-1:0][K_MAX-1:0] cur_poly;
  int unsigned cur_len;

  bit             data_bits[MAXF][64];
  int unsigned    rx[MAXF][64][3];
  bit             ref_bits[MAXF][64];
  bit             got_bits[MAXF][64];
  int unsigned    n_got[MAXF];
  longint         t_last[MAXF];

  function automatic bit [2:0] encode_word(int unsigned word);
    bit [2:0] c;
    for (int n = 0; n < 3; n++) c[n] = ^(K_MAX'(word) & cur_poly[n]);
    return c;
  endfunction

  function automatic int unsigned bdist(int unsigned s, bit b);
    return b ? 7 - s : s;
  endfunction

  // plain Viterbi decoder: integer metrics, survivor from the upper
  // predecessor only when strictly better, trace-back from state 0
  task automatic ref_decode(int f);
    int unsigned ns = 1 << (cur_k - 1);
    int pm[256], npm[256];
    bit dec[64][256];
    int unsigned s;
    for (int i = 0; i < 256; i++) pm[i] = (i == 0) ? 0 : 256;
    for (int t = 0; t < int'(cur_len); t++) begin
      for (int i = 0; i < int'(ns); i++) begin
        int c0, c1;
        int unsigned p0 = i >> 1;
        int unsigned p1 = (i >> 1) | (ns >> 1);
        bit [2:0] w0 = encode_word((p0 << 1) | (i & 1));
        bit [2:0] w1 = encode_word((p1 << 1) | (i & 1));
        c0 = pm[p0]; c1 = pm[p1];
        for (int n = 0; n < (cur_rate3 ? 3 : 2); n++) begin
          c0 += bdist(rx[f][t][n], w0[n]);
          c1 += bdist(rx[f][t][n], w1[n]);
        end
        dec[t][i] = (c1 < c0);
        npm[i]    = (c1 < c0) ? c1 : c0;
      end
      for (int i = 0; i < int'(ns); i++) pm[i] = npm[i];
    end
    s = 0;
    for (int t = int'(cur_len) - 1; t >= 0; t--) begin
      ref_bits[f][t] = s[0];
      s = (s >> 1) | (int'(dec[t][s]) << (cur_k - 2));
    end
  endtask

  // ------------------------------------------------------------- stimulus
  function automatic logic [R_MAX-1:0][K_MAX-1:0] polys(int unsigned k, bit r3);
    case (k)
      3: return r3 ? {9'o5, 9'o7, 9'o7}       : {9'o0, 9'o5, 9'o7};
      4: return r3 ? {9'o17, 9'o15, 9'o13}    : {9'o0, 9'o15, 9'o17};
      5: return r3 ? {9'o37, 9'o33, 9'o25}    : {9'o0, 9'o35, 9'o23};
      6: return r3 ? {9'o75, 9'o53, 9'o47}    : {9'o0, 9'o75, 9'o53};
      7: return r3 ? {9'o175, 9'o145, 9'o133} : {9'o0, 9'o133, 9'o171};
      8: return r3 ? {9'o367, 9'o331, 9'o225} : {9'o0, 9'o371, 9'o247};
      default: return r3 ? {9'o711, 9'o663, 9'o557} : {9'o0, 9'o753, 9'o561};
    endcase
  endfunction

  task automatic configure(int unsigned k, bit r3, int unsigned len);
    @(negedge clk);
    cfg_wdata.k = 4'(k);
    cfg_wdata.rate3 = r3;
    cfg_wdata.poly = polys(k, r3);
    cfg_wdata.frame_len = LEN_W'(len);
    cfg_we = 1'b1;
    @(negedge clk);
    cfg_we = 1'b0;
    check(dut.u_cfg.cfg == cfg_wdata, "configuration write taken");
    cur_k = k; cur_rate3 = r3; cur_poly = polys(k, r3); cur_len = len;
  endtask

  // noise: 0 = clean, 1 = sparse hard errors (correctable), 2 = heavy noise
  task automatic make_frame(int f, int noise);
    int unsigned st = 0;
    for (int t = 0; t < int'(cur_len); t++) begin
      int unsigned w;
      bit [2:0] cb;
      data_bits[f][t] = (t < int'(cur_len - cur_k + 1)) ? 1'($urandom) : 1'b0;
      w = (st << 1) | 32'(data_bits[f][t]);
      cb = encode_word(w);
      st = w & ((1 << (cur_k - 1)) - 1);
      for (int n = 0; n < 3; n++) begin
        int v = cb[n] ? 7 : 0;
        int e = (noise == 2) ? int'($urandom_range(0, 5)) : int'($urandom_range(0, 2));
        v = cb[n] ? v - e : v + e;
        if (noise == 1 && (t % 14) == 6 && n == (t / 14) % (cur_rate3 ? 3 : 2))
          v = 7 - v;                               // hard channel error
        rx[f][t][n] = v;
      end
    end
  endtask

  // streams nf frames; gaps = random holes in sym_valid; poke_cfg = try a
  // configuration write in the middle of the burst
  task automatic run_burst(int nf, int noise, bit gaps, bit poke_cfg);
    longint t_start;
    bit gated_seen = 0;
    int nd = int'(cur_len - cur_k + 1);
    for (int f = 0; f < nf; f++) begin
      make_frame(f, noise);
      ref_decode(f);
      n_got[f] = 0;
    end
    @(negedge clk);
    check(!busy, "idle before burst");
    t_start = cycle;
    fork
      begin : drive
        for (int f = 0; f < nf; f++) begin
          int unsigned i = 0;
          while (i < cur_len) begin
            sym_valid = gaps ? 1'($urandom_range(0, 2) != 0) : 1'b1;
            for (int n = 0; n < 3; n++) sym_data[n] = SOFT_W'(rx[f][i][n]);
            @(posedge clk);
            if (sym_valid && sym_ready) i++;
            else n_stall++;
            @(negedge clk);
          end
        end
        sym_valid = 1'b0;
      end
      begin : collect
        int f = 0;
        while (f < nf) begin
          @(negedge clk);
          if (k_gated_now()) gated_seen = 1;
          if (dut.u_ctrl.dec_wr && dut.u_ctrl.dec_rd) n_tb_overlap++;
          if (dut.u_ctrl.dec_wr && dut.u_ctrl.dec_rd &&
              dut.g_dec[0].u_dmu.wptr == dut.g_dec[0].u_dmu.rptr) n_same_word++;
          if (dut.u_ctrl.ob_rd && dut.u_ctrl.dec_rvalid) n_out_overlap++;
          if (out_valid) begin
            if (n_got[f] < 64) got_bits[f][n_got[f]] = out_bit;
            n_got[f]++;
            if (out_last) begin
              t_last[f] = cycle;
              f++;
            end
          end
        end
      end
      begin : poke
        if (poke_cfg) begin
          cfg_t bad;
          repeat (5) @(negedge clk);
          bad = dut.u_cfg.cfg;
          bad.k = (cur_k == 9) ? 4'd3 : 4'(cur_k + 1);
          cfg_wdata = bad;
          cfg_we = 1'b1;
          @(negedge clk);
          cfg_we = 1'b0;
          check(int'(dut.u_cfg.cfg.k) == int'(cur_k), "configuration ignored while busy");
          if (int'(dut.u_cfg.cfg.k) == int'(cur_k) && busy) n_busy_reject++;
        end
      end
    join
    @(negedge clk);
    check(!busy, "idle after burst");
    for (int f = 0; f < nf; f++) begin
      int mism_ref = 0, mism_tx = 0;
      check(n_got[f] == nd, $sformatf("frame %0d: decoded bit count %0d", f, n_got[f]));
      for (int t = 0; t < nd; t++) begin
        if (got_bits[f][t] != ref_bits[f][t]) mism_ref++;
        if (got_bits[f][t] != data_bits[f][t]) mism_tx++;
      end
      check(mism_ref == 0, $sformatf("k=%0d r3=%0d noise=%0d frame %0d: %0d bits differ from reference",
                                     cur_k, cur_rate3, noise, f, mism_ref));
      if (noise < 2)
        check(mism_tx == 0, $sformatf("k=%0d r3=%0d frame %0d: %0d bits differ from transmitted",
                                      cur_k, cur_rate3, f, mism_tx));
      if (noise == 1 && mism_tx == 0) n_corrected++;
      if (!gaps) begin
        if (f == 0) begin
          check(t_last[0] - t_start == longint'(3 * int'(cur_len) - int'(cur_k) + 2),
                $sformatf("first frame latency %0d, expected %0d", t_last[0] - t_start,
                          3 * int'(cur_len) - int'(cur_k) + 2));
          n_latency++;
        end else begin
          check(t_last[f] - t_last[f-1] == longint'(cur_len),
                $sformatf("frame period %0d, expected %0d", t_last[f] - t_last[f-1], cur_len));
          n_period++;
        end
      end
    end
    if (cur_k < 9) begin
      check(gated_seen, "unused decision RAMs unclocked");
      if (gated_seen) n_gated++;
    end
    n_k[cur_k] += nf;
    n_rate[cur_rate3] += nf;
  endtask

  // the last decision RAM is unclocked whenever k < 9; RAMs of the first
  // unit needed for 2^(k-1) states are clocked
  function automatic bit k_gated_now();
    return (dut.g_dec[7].u_dmu.u_clkc.en_lat[7] == 1'b0) &&
           (dut.g_dec[0].u_dmu.u_clkc.en_lat[0] == 1'b1);
  endfunction

  initial begin
    sym_data = '0;
    cfg_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // an illegal configuration (k = 10) must be refused
    @(negedge clk);
    cfg_wdata = dut.u_cfg.cfg;
    cfg_wdata.k = 4'd10;
    cfg_we = 1'b1;
    @(negedge clk);
    cfg_we = 1'b0;
    check(dut.u_cfg.cfg.k == 4'd3, "illegal configuration refused");
    if (dut.u_cfg.cfg.k == 4'd3) n_illegal_reject++;

    for (int k = 3; k <= 9; k++) begin
      for (int r = 0; r < 2; r++) begin
        configure(k, 1'(r), 64);
        run_burst(3, 0, 0, 0);
        run_burst(3, 1, 0, 1);
        run_burst(2, 2, 1, 0);
        configure(k, 1'(r), k + 5);
        run_burst(MAXF, 1, 1, 0);
        run_burst(MAXF, 2, 0, 0);
      end
    end

    // every mechanism must have happened
    for (int k = 3; k <= 9; k++) check(n_k[k] > 0, $sformatf("K=%0d exercised", k));
    check(n_rate[0] > 0, "rate 1/2 exercised");
    check(n_rate[1] > 0, "rate 1/3 exercised");
    check(n_corrected > 0, "channel errors corrected");
    check(n_gated > 0, "RAM clock gating seen");
    check(n_busy_reject > 0, "busy configuration write ignored");
    check(n_illegal_reject > 0, "illegal configuration refused");
    check(n_stall > 0, "ACS stalled on missing symbols");
    check(n_latency > 0, "latency measured");
    check(n_period > 0, "frame period measured");
    check(n_tb_overlap > 0, "trace-back overlapped ACS");
    check(n_same_word > 0, "decision word read while overwritten");
    check(n_out_overlap > 0, "output overlapped trace-back");
    $display("mechanisms: corrected=%0d gated=%0d busy_reject=%0d illegal_reject=%0d stall=%0d",
             n_corrected, n_gated, n_busy_reject, n_illegal_reject, n_stall);
    $display("            latency=%0d period=%0d tb_overlap=%0d same_word=%0d out_overlap=%0d",
             n_latency, n_period, n_tb_overlap, n_same_word, n_out_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
