// tb_cfg_regs -- configuration registers.
//
// Checks the reset configuration, that legal words are stored, that words
// with k outside 3..9 or a frame length outside k..64 and words written
// while busy are ignored, and for every k the decoded configuration bits:
// the one-hot shift-register select C_(10-k) and the RAM clock enables
// (RAM n of unit u clocked iff 32u+4n < 2^(k-1)).
module automatic tb_cfg_regs;
  import viterbi_pkg::*;

  logic clk = 0, rst_n = 0, we = 0, busy = 0;
  cfg_t wdata, cfg;
  logic [K_MAX-2:1] rsr_c;
  logic [N_DMU-1:0][N_RAM-1:0] dec_ram_en;
  logic [N_RAM-1:0] out_ram_en;
  int checks = 0, failures = 0;

  cfg_regs dut (.*);

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
    cfg_t stored;
    wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(cfg.k == 4'd3 && !cfg.rate3 && cfg.poly[0] == 9'o7 && cfg.poly[1] == 9'o5, "reset value");
    stored = cfg;
    for (int t = 0; t < 600; t++) begin
      bit legal;
      wdata.k = 4'($urandom_range(0, 15));
      wdata.rate3 = 1'($urandom);
      wdata.poly = 27'($urandom);
      wdata.frame_len = 7'($urandom_range(0, 127));
      busy = 1'($urandom_range(0, 3) == 0);
      we = 1'($urandom_range(0, 3) != 0);
      legal = wdata.k >= 3 && wdata.k <= 9 && int'(wdata.frame_len) >= int'(wdata.k)
              && wdata.frame_len <= 64;
      @(negedge clk);
      if (we && !busy && legal) stored = wdata;
      chk(cfg == stored, $sformatf("stored word t=%0d", t));
      for (int i = 1; i <= 7; i++)
        chk(rsr_c[i] == (int'(cfg.k) == 10 - i), $sformatf("rsr_c[%0d] for k=%0d", i, cfg.k));
      for (int u = 0; u < 8; u++)
        for (int n = 0; n < 8; n++)
          chk(dec_ram_en[u][n] == (32*u + 4*n < (1 << (cfg.k - 1))),
              $sformatf("ram enable u=%0d n=%0d k=%0d", u, n, cfg.k));
      chk(out_ram_en == 8'h01, "reorder buffer uses one RAM");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
