// tb_bmu -- exhaustive test of the branch metric unit.
//
// Applies every combination of three 3-bit soft symbols at both rates and
// compares all eight metrics with distances computed here: sum over the
// used symbols of r (expected bit 0) or 7-r (expected bit 1).
module automatic tb_bmu;
  import viterbi_pkg::*;

  logic [R_MAX-1:0][SOFT_W-1:0] sym;
  logic rate3;
  logic [7:0][SOFT_W+1:0] bm;
  int checks = 0, failures = 0;
  logic clk = 0;

  bmu dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2; r++)
      for (int a = 0; a < 512; a++) begin
        rate3 = 1'(r);
        sym = 9'(a);
        #1;
        for (int c = 0; c < 8; c++) begin
          int exp_bm = 0;
          for (int n = 0; n < ((r != 0) ? 3 : 2); n++) begin
            int v = int'(sym[n]);
            exp_bm += c[n] ? 7 - v : v;
          end
          checks++;
          if (int'(bm[c]) != exp_bm) begin
            failures++;
            if (failures < 10) $display("FAIL r3=%0d sym=%h c=%0d bm=%0d exp=%0d", r, sym, c, bm[c], exp_bm);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
