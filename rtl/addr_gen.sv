// addr_gen -- address generator of a data memory unit.
//
// An accumulator feeding a register: on `load` the register takes
// `initial_addr`; otherwise, when `en` is high, it adds `addr_offset` to
// itself (`add_sub` = 1) or subtracts it (`add_sub` = 0), modulo 2^AW.  The
// register drives `addr`.  Ports and structure (accumulator, register, en,
// add_sub, addr_offset, initial_addr, load, clk) follow the design; the
// polarity of add_sub, the priority of load over en and the asynchronous
// active-low reset to 0 are this design's choices.
module addr_gen #(
  parameter int unsigned AW = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          add_sub,
  input  logic [AW-1:0] addr_offset,
  input  logic [AW-1:0] initial_addr,
  input  logic          load,
  output logic [AW-1:0] addr
);

  logic [AW-1:0] acc;

  assign acc = add_sub ? addr + addr_offset : addr - addr_offset;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    addr <= '0;
    else if (load) addr <= initial_addr;
    else if (en)   addr <= acc;
  end

endmodule
