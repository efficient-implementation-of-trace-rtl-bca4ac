// viterbi_fabric -- reconfigurable Viterbi decoder fabric (top level).
//
// Decodes convolutional codes of constraint length 3..9 and rate 1/2 or
// 1/3, chosen at run time through the configuration registers.  Data path:
//   received soft symbols -> branch metric unit (rate-1/3 metrics built on
//   the rate-1/2 circuit) -> ACS array of 128 butterflies (one trellis stage
//   per clock) -> decision vectors, 2^(k-1) bits per stage, written into
//   decision memory, eight data memory units of eight 64x4 block RAMs
//   (256 bits x 64 stages) -> trace-back unit with the reconfigurable right
//   shift register -> output reorder buffer (a ninth data memory unit, one
//   RAM clocked) -> decoded bits in time order.
// Block RAMs that the configured constraint length does not need have
// their clocks stopped by the clock controllers.  The controller overlaps
// the ACS of one frame, the trace-back of the previous one and the output
// of the one before; see vd_ctrl for the alternating-direction addressing
// that lets one 64-word memory hold two frames in flight.
//
// Interface:
//   cfg_we/cfg_wdata : configuration write, taken only while busy is low;
//     do not offer symbols in the same cycle.
//   sym_valid/sym_ready/sym_data : one trellis stage of soft symbols
//     (symbol n in sym_data[n]; symbol 2 ignored at rate 1/2); sym_ready is
//     always high.  Frames are frame_len stages, the encoder's k-1 zero tail
//     bits included, and follow each other without gaps in the stream.
//   out_valid/out_bit/out_last : the frame_len-k+1 decoded data bits of each
//     frame in time order, no back-pressure.
// Timing: the last bit of a frame leaves 3L-k+2 cycles after its first
// symbol is accepted; with symbols back to back one frame of L stages is
// decoded every L cycles.  Frame-based zero-terminated decoding, the
// overlap of the phases and the reorder buffer are this design's choices;
// the block structure follows the design.  The path metrics, the
// trace-back state and valid, the rvalid of decision units 1..7 (identical
// to unit 0's) and the upper 31 bits of the reorder buffer are left unread
// on purpose.
module viterbi_fabric
  import viterbi_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        cfg_we,
  input  cfg_t                        cfg_wdata,
  input  logic                        sym_valid,
  output logic                        sym_ready,
  input  logic [R_MAX-1:0][SOFT_W-1:0] sym_data,
  output logic                        out_valid,
  output logic                        out_bit,
  output logic                        out_last,
  output logic                        busy
);

  cfg_t                        cfg;
  logic [K_MAX-2:1]            rsr_c;
  logic [N_DMU-1:0][N_RAM-1:0] dec_ram_en;
  logic [N_RAM-1:0]            out_ram_en;

  logic [7:0][BM_W-1:0]        bm;
  logic [S_MAX-1:0]            dv;
  logic [S_MAX-1:0][PM_W-1:0]  pm;

  localparam int unsigned AW = $clog2(RAM_DEPTH);

  logic acs_init, acs_step;
  logic dec_wr, dec_w_load, dec_w_up, dec_rd, dec_r_load, dec_r_up;
  logic [AW-1:0] dec_w_addr0, dec_r_addr0;
  logic [N_DMU-1:0] dec_rvalid;
  logic [S_MAX-1:0] dec_rdata;
  logic tbu_clr, tbu_valid, tbu_bit;
  logic [K_MAX-2:0] tbu_state;
  logic ob_wr, ob_w_load, ob_w_up, ob_rd, ob_r_load, ob_r_up, ob_rvalid;
  logic [AW-1:0] ob_w_addr0, ob_r_addr0;
  logic [DMU_W-1:0] ob_rdata;

  cfg_regs u_cfg (
    .clk        (clk),
    .rst_n      (rst_n),
    .we         (cfg_we),
    .wdata      (cfg_wdata),
    .busy       (busy),
    .cfg        (cfg),
    .rsr_c      (rsr_c),
    .dec_ram_en (dec_ram_en),
    .out_ram_en (out_ram_en)
  );

  vd_ctrl u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .k           (cfg.k),
    .frame_len   (cfg.frame_len),
    .sym_valid   (sym_valid),
    .sym_ready   (sym_ready),
    .acs_init    (acs_init),
    .acs_step    (acs_step),
    .dec_wr      (dec_wr),
    .dec_w_load  (dec_w_load),
    .dec_w_addr0 (dec_w_addr0),
    .dec_w_up    (dec_w_up),
    .dec_rd      (dec_rd),
    .dec_r_load  (dec_r_load),
    .dec_r_addr0 (dec_r_addr0),
    .dec_r_up    (dec_r_up),
    .dec_rvalid  (dec_rvalid[0]),
    .tbu_clr     (tbu_clr),
    .ob_wr       (ob_wr),
    .ob_w_load   (ob_w_load),
    .ob_w_addr0  (ob_w_addr0),
    .ob_w_up     (ob_w_up),
    .ob_rd       (ob_rd),
    .ob_r_load   (ob_r_load),
    .ob_r_addr0  (ob_r_addr0),
    .ob_r_up     (ob_r_up),
    .ob_rvalid   (ob_rvalid),
    .out_valid   (out_valid),
    .out_last    (out_last),
    .busy        (busy)
  );

  bmu u_bmu (
    .sym   (sym_data),
    .rate3 (cfg.rate3),
    .bm    (bm)
  );

  acs_array u_acs (
    .clk   (clk),
    .rst_n (rst_n),
    .init  (acs_init),
    .step  (acs_step),
    .k     (cfg.k),
    .poly  (cfg.poly),
    .bm    (bm),
    .dv    (dv),
    .pm    (pm)
  );

  for (genvar u = 0; u < int'(N_DMU); u++) begin : g_dec
    data_mem_unit u_dmu (
      .clk      (clk),
      .rst_n    (rst_n),
      .ram_en   (dec_ram_en[u]),
      .mode     (MEM_RAM),
      .clr      (1'b0),
      .wr       (dec_wr),
      .wdata    (dv[u*DMU_W +: DMU_W]),
      .w_load   (dec_w_load),
      .w_addr0  (dec_w_addr0),
      .w_up     (dec_w_up),
      .rd       (dec_rd),
      .r_load   (dec_r_load),
      .r_addr0  (dec_r_addr0),
      .r_up     (dec_r_up),
      .rdata    (dec_rdata[u*DMU_W +: DMU_W]),
      .rvalid   (dec_rvalid[u])
    );
  end

  tbu u_tbu (
    .clk       (clk),
    .rst_n     (rst_n),
    .clr       (tbu_clr),
    .c         (rsr_c),
    .dv_valid  (dec_rvalid[0]),
    .dv        (dec_rdata),
    .out_valid (tbu_valid),
    .out_bit   (tbu_bit),
    .state     (tbu_state)
  );

  data_mem_unit u_obuf (
    .clk      (clk),
    .rst_n    (rst_n),
    .ram_en   (out_ram_en),
    .mode     (MEM_RAM),
    .clr      (1'b0),
    .wr       (ob_wr),
    .wdata    (DMU_W'(tbu_bit)),
    .w_load   (ob_w_load),
    .w_addr0  (ob_w_addr0),
    .w_up     (ob_w_up),
    .rd       (ob_rd),
    .r_load   (ob_r_load),
    .r_addr0  (ob_r_addr0),
    .r_up     (ob_r_up),
    .rdata    (ob_rdata),
    .rvalid   (ob_rvalid)
  );

  assign out_bit = ob_rdata[0];

endmodule
