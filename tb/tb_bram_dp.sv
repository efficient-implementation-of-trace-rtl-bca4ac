// tb_bram_dp -- 64x4 dual-port RAM: fills the memory, then random
// simultaneous writes and reads (including the same address) against a
// model; read data arrives one cycle after the read, old data on a
// read-during-write to the same word, and rdata holds when re is low.
module automatic tb_bram_dp;
  logic clk = 0, we = 0, re = 0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [3:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [3:0] model[64];

  bram_dp dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp_r = '0;
    @(negedge clk);
    for (int a = 0; a < 64; a++) begin
      we = 1; waddr = 6'(a); wdata = 4'($urandom); model[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int t = 0; t < 3000; t++) begin
      we = 1'($urandom); re = 1'($urandom);
      waddr = 6'($urandom); wdata = 4'($urandom);
      raddr = ($urandom_range(0, 3) == 0) ? waddr : 6'($urandom);
      if (re) exp_r = model[raddr];
      @(negedge clk);
      if (we) model[waddr] = wdata;
      checks++;
      if (rdata != exp_r) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d rdata=%h exp=%h", t, rdata, exp_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
