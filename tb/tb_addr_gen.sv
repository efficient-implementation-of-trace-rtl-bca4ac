// tb_addr_gen -- address generator: random load / add / subtract / hold
// sequences with random offsets, compared with a modulo-64 model.
module automatic tb_addr_gen;
  logic clk = 0, rst_n = 0, en = 0, add_sub = 0, load = 0;
  logic [5:0] addr_offset = '0, initial_addr = '0, addr;
  int checks = 0, failures = 0;

  addr_gen dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int model = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (addr != 0) failures++;
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      load = 1'($urandom_range(0, 9) == 0);
      en = 1'($urandom);
      add_sub = 1'($urandom);
      addr_offset = 6'($urandom);
      initial_addr = 6'($urandom);
      @(negedge clk);
      if (load) model = int'(initial_addr);
      else if (en) model = add_sub ? (model + int'(addr_offset)) % 64
                                   : (model - int'(addr_offset) + 64) % 64;
      checks++;
      if (int'(addr) != model) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d addr=%0d exp=%0d", t, addr, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
