// bram_dp -- 64-word x 4-bit dual-port block RAM, the basic memory element
// of the RAM cluster.
//
// One write port and one read port on a common clock.  A write stores
// `wdata` at `waddr` on the rising edge when `we` is high.  A read registers
// the word at `raddr` into `rdata` on the rising edge when `re` is high
// (one cycle latency); reading the address being written returns the old
// word.  Contents are not initialised.  Size and dual-port nature follow the
// design; the port arrangement and timing are this design's.
module bram_dp #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned W     = 4,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
