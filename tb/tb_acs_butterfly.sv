// tb_acs_butterfly -- random test of one butterfly.
//
// Random constraint length, butterfly index, generator polynomials, branch
// metrics and predecessor metrics (kept within the modulo-comparison range,
// including wrap-around of the 12-bit metric).  The expected codewords,
// sums, survivors and decisions are computed here with integers.
module automatic tb_acs_butterfly;
  import viterbi_pkg::*;

  logic [K_MAX-2:0] m;
  logic [3:0] k;
  logic [R_MAX-1:0][K_MAX-1:0] poly;
  logic [7:0][BM_W-1:0] bm;
  logic [PM_W-1:0] pm_j0, pm_j1, pm_i0, pm_i1;
  logic d_i0, d_i1;
  int checks = 0, failures = 0;
  logic clk = 0;

  acs_butterfly dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    for (int it = 0; it < 4000; it++) begin
      int kk = $urandom_range(3, 9);
      int mm = $urandom_range(0, (1 << (kk - 2)) - 1);
      int base = $urandom_range(0, 4095);
      int off0 = $urandom_range(0, 300), off1 = $urandom_range(0, 300);
      int j1 = mm + (1 << (kk - 2));
      k = 4'(kk); m = 8'(mm);
      for (int n = 0; n < 3; n++) poly[n] = 9'($urandom) & 9'((1 << kk) - 1);
      for (int c = 0; c < 8; c++) bm[c] = 5'($urandom_range(0, 21));
      if (it % 7 == 0) off1 = off0;                       // force ties
      pm_j0 = 12'(base + off0);
      pm_j1 = 12'(base + off1);
      #1;
      for (int u = 0; u < 2; u++) begin
        int w0 = (mm << 1) | u, w1 = (j1 << 1) | u;
        int c0 = 0, c1 = 0, s0, s1, expd, exppm;
        for (int n = 0; n < 3; n++) begin
          c0 |= int'(^(9'(w0) & poly[n])) << n;
          c1 |= int'(^(9'(w1) & poly[n])) << n;
        end
        s0 = off0 + int'(bm[c0]);
        s1 = off1 + int'(bm[c1]);
        expd = int'(s1 < s0);
        exppm = (base + ((expd != 0) ? s1 : s0)) % 4096;
        if (u == 0) begin
          chk(d_i0 == 1'(expd), $sformatf("d_i0 k=%0d m=%0d", kk, mm));
          chk(int'(pm_i0) == exppm, $sformatf("pm_i0 k=%0d m=%0d got %0d exp %0d", kk, mm, pm_i0, exppm));
        end else begin
          chk(d_i1 == 1'(expd), $sformatf("d_i1 k=%0d m=%0d", kk, mm));
          chk(int'(pm_i1) == exppm, $sformatf("pm_i1 k=%0d m=%0d got %0d exp %0d", kk, mm, pm_i1, exppm));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
