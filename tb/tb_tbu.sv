// tb_tbu -- trace-back unit against a software trace-back.
//
// For every k, random decision vectors (bits of non-existent states zero)
// are presented with random gaps.  Each valid cycle the emitted bit must be
// the LSB of the model state, and the state then follows
// S <- {dv[S], S[k-2:1]}.  clr restarts from state 0.
module automatic tb_tbu;
  import viterbi_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, dv_valid = 0;
  logic [K_MAX-2:1] c;
  logic [S_MAX-1:0] dv;
  logic out_valid, out_bit;
  logic [K_MAX-2:0] state;
  int checks = 0, failures = 0;

  tbu dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned s;
    c = '0; dv = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 3; k <= 9; k++) begin
      c = '0;
      c[10 - k] = 1'b1;
      for (int frame = 0; frame < 3; frame++) begin
        clr = 1; dv_valid = 0;
        @(negedge clk);
        clr = 0;
        s = 0;
        for (int t = 0; t < 64; t++) begin
          dv_valid = 1'($urandom_range(0, 4) != 0);
          for (int w = 0; w < 8; w++) dv[w*32 +: 32] = $urandom;
          for (int i = 1 << (k - 1); i < 256; i++) dv[i] = 1'b0;
          #1;
          checks++;
          if (out_valid != dv_valid || (dv_valid && out_bit != 1'(s & 1))) begin
            failures++;
            if (failures < 10) $display("FAIL k=%0d t=%0d bit=%0d exp=%0d", k, t, out_bit, s & 1);
          end
          @(negedge clk);
          if (dv_valid) s = (s >> 1) | (int'(dv[s]) << (k - 2));
          checks++;
          if (int'(state) != s) begin
            failures++;
            if (failures < 10) $display("FAIL k=%0d t=%0d state=%0h exp=%0h", k, t, state, s);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
