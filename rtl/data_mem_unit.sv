// data_mem_unit -- reconfigurable data memory unit: RAM cluster, clock
// controller and address generators.
//
// Stores words of up to N*W bits (32 by default) in a cluster of N block
// RAMs of DEPTH x W.  `ram_en` is configuration: bit n switches the clock of
// RAM n on, so a narrow configuration leaves the unused RAMs unclocked.
// Two address generators, one for the write port and one for the read port,
// give the unit three access disciplines selected by `mode`:
//   MEM_FIFO : `wr` writes at the write pointer and advances it; `rd` reads
//              at the read pointer and advances it.
//   MEM_LIFO : a stack.  The write generator holds the next free word, the
//              read generator the top of stack (one below).  `wr` pushes and
//              `rd` pops; both generators step up on a push, down on a pop.
//              Push and pop in the same cycle are not allowed.
//   MEM_RAM  : addressed access.  Each port's address is its generator's
//              register: `w_load`/`r_load` load it with `w_addr0`/`r_addr0`
//              (effective from the next cycle), and every `wr`/`rd` steps
//              it by one, up when `w_up`/`r_up` is high, else down.  A
//              random access is a load followed by the access; a run of
//              consecutive words needs one load.  A load in the same cycle
//              as an access applies after that access.
// `clr` empties the unit (FIFO/LIFO pointers back to the start); reset
// clears both pointers to 0, so issue `clr` once before using LIFO mode.  Read data
// appears on `rdata` one cycle after `rd`, flagged by `rvalid`.  There is no
// full/empty detection: the user tracks the fill level.
//
// The three components and the FIFO/LIFO/RAM modes follow the design; using
// a separate generator per port, the pointer conventions and the handshake
// are this design's choices.
module data_mem_unit
  import viterbi_pkg::*;
#(
  parameter int unsigned N     = N_RAM,
  parameter int unsigned DEPTH = RAM_DEPTH,
  parameter int unsigned W     = RAM_W,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   ram_en,
  input  mem_mode_e      mode,
  input  logic           clr,
  input  logic           wr,
  input  logic [N*W-1:0] wdata,
  input  logic           w_load,
  input  logic [AW-1:0]  w_addr0,
  input  logic           w_up,
  input  logic           rd,
  input  logic           r_load,
  input  logic [AW-1:0]  r_addr0,
  input  logic           r_up,
  output logic [N*W-1:0] rdata,
  output logic           rvalid
);

  logic [N-1:0]  gclk;
  logic [AW-1:0] wptr, rptr;
  logic          w_en, w_add, r_en, r_add;
  logic [AW-1:0] w_init, r_init;
  logic          w_ld, r_ld;

  always_comb begin
    unique case (mode)
      MEM_FIFO: begin
        w_en = wr;  w_add = 1'b1;  w_ld = clr;  w_init = '0;
        r_en = rd;  r_add = 1'b1;  r_ld = clr;  r_init = '0;
      end
      MEM_LIFO: begin
        w_en = wr | rd;  w_add = wr;  w_ld = clr;  w_init = '0;
        r_en = wr | rd;  r_add = wr;  r_ld = clr;
        r_init = '1;            // top of an empty stack is one below word 0
      end
      default: begin            // MEM_RAM
        w_en = wr;  w_add = w_up;  w_ld = clr | w_load;
        w_init = w_load ? w_addr0 : '0;
        r_en = rd;  r_add = r_up;  r_ld = clr | r_load;
        r_init = r_load ? r_addr0 : '0;
      end
    endcase
  end

  addr_gen #(.AW(AW)) u_wag (
    .clk          (clk),
    .rst_n        (rst_n),
    .en           (w_en),
    .add_sub      (w_add),
    .addr_offset  (AW'(1)),
    .initial_addr (w_init),
    .load         (w_ld),
    .addr         (wptr)
  );

  addr_gen #(.AW(AW)) u_rag (
    .clk          (clk),
    .rst_n        (rst_n),
    .en           (r_en),
    .add_sub      (r_add),
    .addr_offset  (AW'(1)),
    .initial_addr (r_init),
    .load         (r_ld),
    .addr         (rptr)
  );

  clock_ctrl #(.N(N)) u_clkc (
    .clk    (clk),
    .ram_en (ram_en),
    .gclk   (gclk)
  );

  ram_cluster #(.N(N), .DEPTH(DEPTH), .W(W)) u_cluster (
    .gclk  (gclk),
    .we    (wr),
    .waddr (wptr),
    .wdata (wdata),
    .re    (rd),
    .raddr (rptr),
    .rdata (rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rvalid <= 1'b0;
    else        rvalid <= rd;
  end

  a_lifo_no_push_pop: assert property (@(posedge clk) disable iff (!rst_n)
    !(mode == MEM_LIFO && wr && rd));

endmodule
