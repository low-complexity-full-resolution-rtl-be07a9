// dpd_pkg: shared types and constants of the mirror-switching predistorter.
//
// The LUT depth of 4096 entries per table (two tables, 2 x 4096 data points)
// follows the published design. The word widths, the operating-mode encoding
// and the fixed pipeline latencies below are choices of this implementation.
package dpd_pkg;

  // Default geometry
  localparam int unsigned N_ENTRIES_DEF = 4096; // entries per 1D LUT (published)
  localparam int unsigned AM_W_DEF      = 12;   // amplitude code width = log2(4096)
  localparam int unsigned PH_W_DEF      = 12;   // phase code width, full circle = 2**PH_W
  localparam int unsigned IQ_W_DEF      = 13;   // signed I/Q sample width
  localparam int unsigned STAGES_DEF    = 18;   // CORDIC micro-rotation stages (published)
  localparam int unsigned EXT_DEF       = 6;    // tail-zero bits appended to I/Q
  localparam int unsigned GAIN_W        = 16;   // gain alignment factor, unsigned Q2.14
  localparam int unsigned GAIN_FRAC     = 14;

  // CORDIC latency: one pre-rotation register, STAGES micro-rotations,
  // one output (gain compensation and rounding) register.
  function automatic int unsigned cordic_latency(int unsigned stages);
    return stages + 2;
  endfunction

  // Which agent owns the LUT ports (the "mirror switch" position).
  typedef enum logic [1:0] {
    MODE_OPERATE = 2'd0,  // AM LUT addressed by input amplitude, read only
    MODE_TRAIN   = 2'd1,  // AM LUT addressed by received amplitude, written with ramp
    MODE_INTERP  = 2'd2   // AM LUT owned by the interpolator
  } lut_mode_e;

  // Training sequencer states
  typedef enum logic [2:0] {
    TS_IDLE   = 3'd0,
    TS_CLEAR  = 3'd1,
    TS_WRITE  = 3'd2,
    TS_INTERP = 3'd3,
    TS_DONE   = 3'd4,
    TS_FAIL   = 3'd5
  } train_state_e;

endpackage
