// tb_ram_cluster -- eight RAMs on individual clocks.
//
// The test generates the eight RAM clocks itself: each phase picks a random
// set of clocked RAMs, then random full-width writes and reads follow.
// Clocked slices must behave as a 64-word memory; an unclocked slice must
// neither store data nor change its read output.
module automatic tb_ram_cluster;
  logic clk = 0;
  logic [7:0] sel = '1;
  logic [7:0] gclk;
  logic we = 0, re = 0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [31:0] model[64];

  assign gclk = {8{clk}} & sel;

  ram_cluster dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_r, mask;
    @(negedge clk);
    sel = '1;
    for (int a = 0; a < 64; a++) begin
      we = 1; waddr = 6'(a); wdata = $urandom; model[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    re = 1; raddr = 0;
    @(negedge clk);
    exp_r = model[0];
    for (int ph = 0; ph < 20; ph++) begin
      sel = 8'($urandom);
      if (ph == 0) sel = 8'h01;
      mask = '0;
      for (int n = 0; n < 8; n++) if (sel[n]) mask[n*4 +: 4] = 4'hf;
      for (int t = 0; t < 100; t++) begin
        we = 1'($urandom); re = 1'($urandom);
        waddr = 6'($urandom); raddr = 6'($urandom); wdata = $urandom;
        if (re) exp_r = (model[raddr] & mask) | (exp_r & ~mask);
        @(negedge clk);
        if (we) model[waddr] = (wdata & mask) | (model[waddr] & ~mask);
        checks++;
        if (rdata != exp_r) begin
          failures++;
          if (failures < 10) $display("FAIL ph=%0d sel=%h rdata=%h exp=%h", ph, sel, rdata, exp_r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
