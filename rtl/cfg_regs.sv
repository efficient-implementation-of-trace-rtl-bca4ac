// cfg_regs -- configuration registers of the fabric.
//
// The host processor reconfigures the decoder at run time by writing one
// configuration word (cfg_t: constraint length, rate, generator polynomials,
// frame length) with `we`.  A write is accepted only while the decoder is
// idle (`busy` low) and only if the word is legal: 3 <= k <= 9 and
// k <= frame_len <= RAM_DEPTH; otherwise the previous configuration stays.
// From the stored word the register block decodes the configuration bits
// that steer the fabric:
//   rsr_c      : one-hot C1..C7 of the trace-back shift register,
//                C_(K_MAX+1-k) set, so the decision bit enters bit k-2;
//   dec_ram_en : clock enable of every block RAM of decision memory; RAM n
//                of unit u holds the decision bits of states 32u+4n..+3 and
//                is clocked only if those states exist (4n+32u < 2^(k-1));
//   out_ram_en : the reorder buffer needs one bit per word, one RAM.
// Reset loads K = 3, rate 1/2, generators 7 and 5 (octal) and 16-stage
// frames.  Run-time reconfiguration by configuration bits follows the
// design; the word layout, legality rules and reset values are this
// design's choices.
module cfg_regs
  import viterbi_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          we,
  input  cfg_t                          wdata,
  input  logic                          busy,
  output cfg_t                          cfg,
  output logic [K_MAX-2:1]              rsr_c,
  output logic [N_DMU-1:0][N_RAM-1:0]   dec_ram_en,
  output logic [N_RAM-1:0]              out_ram_en
);

  localparam cfg_t CFG_RESET = '{
    k:         4'd3,
    rate3:     1'b0,
    poly:      {K_MAX'(0), K_MAX'('o5), K_MAX'('o7)},
    frame_len: LEN_W'(16)
  };

  logic legal;

  assign legal = (wdata.k >= 4'(K_MIN)) && (wdata.k <= 4'(K_MAX)) &&
                 (LEN_W'(wdata.k) <= wdata.frame_len) &&
                 (wdata.frame_len <= LEN_W'(RAM_DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      cfg <= CFG_RESET;
    else if (we && !busy && legal)   cfg <= wdata;
  end

  always_comb begin
    for (int i = 1; i <= int'(K_MAX) - 2; i++)
      rsr_c[i] = (int'(cfg.k) == int'(K_MAX) + 1 - i);
    for (int u = 0; u < int'(N_DMU); u++)
      for (int n = 0; n < int'(N_RAM); n++)
        dec_ram_en[u][n] = (u * int'(DMU_W) + n * int'(RAM_W)) < (1 << (int'(cfg.k) - 1));
    out_ram_en = N_RAM'(1);
  end

endmodule
