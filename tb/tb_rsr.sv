// tb_rsr -- reconfigurable right shift register for every constraint length.
//
// For k = 3..9 the one-hot configuration bit C_(10-k) is set, the register
// is cleared and fed random decision bits with random enables.  After every
// clock the state must equal the model S <- {d, S[k-2:1]} on k-1 bits, with
// all bits above k-2 zero; disabled cycles must hold the state.
module automatic tb_rsr;
  import viterbi_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, en = 0, d = 0;
  logic [K_MAX-2:1] c;
  logic [K_MAX-2:0] s;
  int checks = 0, failures = 0;

  rsr dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned model;
    c = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 3; k <= 9; k++) begin
      c = '0;
      c[10 - k] = 1'b1;
      clr = 1; d = 1; en = 1;
      @(negedge clk);
      clr = 0;
      model = 0;
      checks++;
      if (s != 0) failures++;
      for (int t = 0; t < 200; t++) begin
        en = 1'($urandom_range(0, 3) != 0);
        d = 1'($urandom);
        @(negedge clk);
        if (en) model = (model >> 1) | (int'(d) << (k - 2));
        checks++;
        if (int'(s) != model) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d t=%0d s=%0h exp=%0h", k, t, s, model);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
