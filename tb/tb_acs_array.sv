// tb_acs_array -- the full 256-state ACS array against a software trellis.
//
// For each constraint length 3..9: random polynomials and random branch
// metric tables are applied for 40 steps (with idle cycles in between that
// must not change anything); after every step all path metrics (modulo
// 2^12) and the full decision vector are compared with an integer model
// started from the same initial metrics (0 for state 0, 256 otherwise).
module automatic tb_acs_array;
  import viterbi_pkg::*;

  logic clk = 0, rst_n = 0, init = 0, step = 0;
  logic [3:0] k;
  logic [R_MAX-1:0][K_MAX-1:0] poly;
  logic [7:0][BM_W-1:0] bm;
  logic [S_MAX-1:0] dv;
  logic [S_MAX-1:0][PM_W-1:0] pm;
  int checks = 0, failures = 0;

  acs_array dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  int mpm[256], npm[256];
  bit mdv[256];

  initial begin
    k = 4'd3; poly = '0; bm = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int kk = 3; kk <= 9; kk++) begin
      int ns = 1 << (kk - 1);
      k = 4'(kk);
      for (int n = 0; n < 3; n++) poly[n] = 9'($urandom) | 9'(1) | 9'(1 << (kk - 1));
      init = 1;
      @(negedge clk);
      init = 0;
      for (int i = 0; i < 256; i++) mpm[i] = (i == 0) ? 0 : 256;
      for (int t = 0; t < 40; t++) begin
        for (int c = 0; c < 8; c++) bm[c] = 5'($urandom_range(0, 21));
        step = 1;
        #1;
        // model one stage
        for (int i = 0; i < ns; i++) begin
          int p0 = i >> 1, p1 = (i >> 1) | (ns >> 1), c0 = 0, c1 = 0, s0, s1;
          for (int n = 0; n < 3; n++) begin
            c0 |= int'(^(9'((p0 << 1) | (i & 1)) & poly[n])) << n;
            c1 |= int'(^(9'((p1 << 1) | (i & 1)) & poly[n])) << n;
          end
          s0 = mpm[p0] + int'(bm[c0]);
          s1 = mpm[p1] + int'(bm[c1]);
          mdv[i] = (s1 < s0);
          npm[i] = mdv[i] ? s1 : s0;
        end
        begin
          bit dv_ok = 1;
          for (int i = 0; i < 256; i++)
            if (dv[i] != ((i < ns) ? mdv[i] : 1'b0)) dv_ok = 0;
          chk(dv_ok, $sformatf("decision vector k=%0d t=%0d", kk, t));
        end
        @(negedge clk);
        step = 0;
        for (int i = 0; i < ns; i++) mpm[i] = npm[i];
        begin
          bit pm_ok = 1;
          for (int i = 0; i < ns; i++)
            if (int'(pm[i]) != mpm[i] % 4096) pm_ok = 0;
          chk(pm_ok, $sformatf("path metrics k=%0d t=%0d", kk, t));
        end
        // an idle cycle must hold the metrics
        @(negedge clk);
        begin
          bit hold_ok = 1;
          for (int i = 0; i < ns; i++)
            if (int'(pm[i]) != mpm[i] % 4096) hold_ok = 0;
          chk(hold_ok, "metrics held without step");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
