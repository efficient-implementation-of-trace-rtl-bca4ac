// viterbi_pkg -- constants and types shared by the reconfigurable Viterbi
// decoder fabric.
//
// The fabric decodes convolutional codes of constraint length K = 3..9 and
// code rate 1/2 or 1/3 (both ranges are the design's specification).  The
// trellis therefore has up to 2^(K_MAX-1) = 256 states, handled by up to 128
// butterflies.  Decision memory is built from 64-word x 4-bit dual-port block
// RAMs, eight to a data memory unit, so one unit holds 32 decision bits per
// trellis stage.  Soft-symbol width, path-metric width and the layout of the
// configuration word are this design's own choices.
//
// State convention used throughout: after input bit u_t the encoder state is
//   S_t = ((S_{t-1} << 1) | u_t) mod 2^(K-1)
// so the newest bit sits in the LSB, and the trace-back recursion is
//   S_{t-1} = {d_t, S_t[K-2:1]}   (right shift, decision bit enters the MSB).
package viterbi_pkg;

  localparam int unsigned K_MAX    = 9;                 // largest constraint length
  localparam int unsigned K_MIN    = 3;                 // smallest constraint length
  localparam int unsigned S_MAX    = 1 << (K_MAX - 1);  // trellis states at K_MAX
  localparam int unsigned R_MAX    = 3;                 // code symbols per bit (rate 1/3)
  localparam int unsigned SOFT_W   = 3;                 // soft-decision bits per symbol
  localparam int unsigned BM_W     = SOFT_W + 2;        // branch metric width (3 symbols)
  localparam int unsigned PM_W     = 12;                // path metric width, modulo arithmetic
  localparam int unsigned RAM_DEPTH = 64;               // words per block RAM
  localparam int unsigned RAM_W    = 4;                 // bits per block RAM word
  localparam int unsigned N_RAM    = 8;                 // block RAMs per RAM cluster
  localparam int unsigned DMU_W    = RAM_W * N_RAM;     // 32 bits per data memory unit
  localparam int unsigned N_DMU    = S_MAX / DMU_W;     // data memory units for one decision vector
  localparam int unsigned LEN_W    = $clog2(RAM_DEPTH) + 1;  // frame length field, 1..64

  typedef logic [SOFT_W-1:0] soft_t;
  typedef logic [BM_W-1:0]   bm_t;
  typedef logic [PM_W-1:0]   pm_t;
  typedef logic [K_MAX-1:0]  poly_t;

  // Access discipline of a data memory unit.
  typedef enum logic [1:0] {
    MEM_FIFO = 2'd0,
    MEM_LIFO = 2'd1,
    MEM_RAM  = 2'd2
  } mem_mode_e;

  // Configuration word written by the host processor.
  //   k         : constraint length, 3..9
  //   rate3     : 0 = rate 1/2 (symbols 0,1), 1 = rate 1/3 (symbols 0,1,2)
  //   poly[n]   : generator of code symbol n; bit 0 taps the current
  //               input bit, bit j the input bit j stages old
  //   frame_len : trellis stages per frame, tail bits included, K..64
  typedef struct packed {
    logic [3:0]                    k;
    logic                          rate3;
    logic [R_MAX-1:0][K_MAX-1:0]   poly;
    logic [LEN_W-1:0]              frame_len;
  } cfg_t;

  // Parity of the taps selected by a generator polynomial.
  function automatic logic parity(input logic [K_MAX-1:0] v);
    return ^v;
  endfunction

endpackage
