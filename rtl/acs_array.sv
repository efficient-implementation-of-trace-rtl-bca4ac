// acs_array -- the path-metric recursion for the whole trellis.
//
// Holds one path-metric register per state (2^(KM-1) of them) and NB_MAX
// butterflies.  Each cycle with `step` high, every active butterfly
// (index m < 2^(k-2)) updates the metrics of states 2m and 2m+1 from those of
// states m and m + 2^(k-2), and the full decision vector of the stage
// (one bit per state, bit i for state i) is presented on `dv` in the same
// cycle, to be written into decision memory on that clock edge.  Decision
// bits of states beyond 2^(k-1) read 0.
//
// The second predecessor of a butterfly depends on the constraint length;
// it is chosen by a per-butterfly multiplexer over the legal k values, which
// is how the array is reconfigured.  `init` loads the metrics for a frame
// that starts in state 0: 0 for state 0, PM_INIT for every other state.
// Reset (asynchronous, active low) does the same.
//
// Timing: one trellis stage per clock; dv is combinational from the BMU
// input and the metric registers.
module acs_array
  import viterbi_pkg::*;
#(
  parameter int unsigned KM      = K_MAX,
  parameter int unsigned PW      = PM_W,
  parameter int unsigned BW      = BM_W,
  parameter int unsigned PM_INIT = 256
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      init,
  input  logic                      step,
  input  logic [3:0]                k,
  input  logic [R_MAX-1:0][KM-1:0]  poly,
  input  logic [7:0][BW-1:0]        bm,
  output logic [(1<<(KM-1))-1:0]    dv,
  output logic [(1<<(KM-1))-1:0][PW-1:0] pm
);

  localparam int unsigned NS = 1 << (KM - 1);
  localparam int unsigned NB = NS / 2;

  logic [NS-1:0][PW-1:0] pm_next;
  logic [NS-1:0]         dec;
  logic [NB-1:0]         active;

  for (genvar m = 0; m < int'(NB); m++) begin : g_bf
    logic [PW-1:0] pm_j1;

    // predecessor {1,m}: state m + 2^(k-2), selected per constraint length
    always_comb begin
      pm_j1 = pm[(m + 2) % NS];
      for (int kk = K_MIN; kk <= int'(KM); kk++)
        if (k == 4'(kk)) pm_j1 = pm[(m + (1 << (kk - 2))) % NS];
    end

    assign active[m] = (m < (1 << (k - 4'd2)));

    acs_butterfly #(.KM(KM), .PW(PW), .BW(BW)) u_bf (
      .m     ((KM-1)'(m)),
      .k     (k),
      .poly  (poly),
      .bm    (bm),
      .pm_j0 (pm[m]),
      .pm_j1 (pm_j1),
      .pm_i0 (pm_next[2*m]),
      .pm_i1 (pm_next[2*m+1]),
      .d_i0  (dec[2*m]),
      .d_i1  (dec[2*m+1])
    );

    assign dv[2*m]   = active[m] & dec[2*m];
    assign dv[2*m+1] = active[m] & dec[2*m+1];

    for (genvar h = 0; h < 2; h++) begin : g_reg
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)
          pm[2*m+h] <= (2*m+h == 0) ? '0 : PW'(PM_INIT);
        else if (init)
          pm[2*m+h] <= (2*m+h == 0) ? '0 : PW'(PM_INIT);
        else if (step && active[m])
          pm[2*m+h] <= pm_next[2*m+h];
      end
    end
  end

endmodule
