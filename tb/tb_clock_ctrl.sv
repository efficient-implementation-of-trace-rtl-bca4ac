// tb_clock_ctrl -- clock gating of the RAM clocks.
//
// Random enable patterns are changed at random points, also while the clock
// is high.  Every rising edge of a gated clock is counted; it must coincide
// with a rising edge of the input clock, and a channel must get exactly one
// edge for every input edge at which its enable was set during the
// preceding low phase (no short pulses, no missed edges).
module automatic tb_clock_ctrl;
  localparam int N = 8;
  logic clk = 0;
  logic [N-1:0] ram_en = '0, gclk;
  int checks = 0, failures = 0;
  int edges[N], expected[N];

  clock_ctrl #(.N(N)) dut (.*);

  for (genvar n = 0; n < N; n++) begin : g_cnt
    always @(posedge gclk[n]) begin
      edges[n]++;
      checks++;
      if (clk !== 1'b1) begin
        failures++;
        $display("FAIL gated edge %0d outside a clock edge", n);
      end
    end
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] en_low;
    for (int n = 0; n < N; n++) begin edges[n] = 0; expected[n] = 0; end
    for (int t = 0; t < 500; t++) begin
      // low phase: set a new enable pattern
      ram_en = N'($urandom);
      #3;
      en_low = ram_en;
      #2;
      clk = 1;
      for (int n = 0; n < N; n++) if (en_low[n]) expected[n]++;
      // high phase: changes here must not reach the gated clocks
      #2;
      ram_en = N'($urandom);
      #3;
      clk = 0;
      ram_en = en_low;
    end
    #5;
    for (int n = 0; n < N; n++) begin
      checks++;
      if (edges[n] != expected[n]) begin
        failures++;
        $display("FAIL channel %0d: %0d edges, expected %0d", n, edges[n], expected[n]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
