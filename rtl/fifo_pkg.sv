// fifo_pkg: constants and types shared by the asynchronous FIFO.
//
// The data width (16 bits) is the one visible in the design's simulation
// waveforms; the depth (16 words), the number of delay-measurement sampling
// clocks (4, as in the described four-way sampling) and the calibration
// state encoding are held here so that every module agrees on them.
package fifo_pkg;

  localparam int unsigned DATA_W_DEF = 16;  // word width
  localparam int unsigned ADDR_W_DEF = 4;   // log2(depth): 16 words (own choice)
  localparam int unsigned N_PHASE    = 4;   // four-way sampling clocks

  // States of the delay-correction sequencer: measure the phase, apply the
  // decimal (sub-cycle) correction, apply the integer (whole-cell)
  // correction, let the pointers settle, then verify.
  typedef enum logic [2:0] {
    CAL_IDLE,
    CAL_MEAS,
    CAL_DEC,
    CAL_INT,
    CAL_LOAD,
    CAL_SETTLE,
    CAL_CHECK
  } cal_state_t;

endpackage
