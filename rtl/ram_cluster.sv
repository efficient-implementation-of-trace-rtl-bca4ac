// ram_cluster -- N block RAMs side by side, forming one memory of
// DEPTH words of N*W bits.
//
// All RAMs share the write and read addresses and strobes; RAM n holds bits
// [n*W +: W] of the word and runs on its own clock gclk[n] from the clock
// controller.  A RAM whose clock is stopped neither writes nor updates its
// read register, so the usable width is W times the number of clocked RAMs
// (4 to 32 bits for the default eight 64x4 RAMs).  Eight 64x4 dual-port RAMs
// follow the design.
module ram_cluster #(
  parameter int unsigned N     = 8,
  parameter int unsigned DEPTH = 64,
  parameter int unsigned W     = 4,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic [N-1:0]   gclk,
  input  logic           we,
  input  logic [AW-1:0]  waddr,
  input  logic [N*W-1:0] wdata,
  input  logic           re,
  input  logic [AW-1:0]  raddr,
  output logic [N*W-1:0] rdata
);

  for (genvar n = 0; n < int'(N); n++) begin : g_ram
    bram_dp #(.DEPTH(DEPTH), .W(W)) u_ram (
      .clk   (gclk[n]),
      .we    (we),
      .waddr (waddr),
      .wdata (wdata[n*W +: W]),
      .re    (re),
      .raddr (raddr),
      .rdata (rdata[n*W +: W])
    );
  end

endmodule
