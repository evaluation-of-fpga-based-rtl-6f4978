// svpwm_pkg: constants and types shared by the SVPWM V/f controller.
//
// Time is counted in cycles of the 100 MHz system clock. One switching
// (sampling) period Ts of the 10 kHz SVPWM is 10000 cycles, and the on-times
// Ta, Tb, To are defined over half of it, Ts/2 = 5000 cycles, as in the
// relation To = Ts/2 - (Ta + Tb). Angles are in tenths of a degree, so one
// electrical revolution is 3600 units and fits the 12-bit angle bus. The
// modulation index is a 10-bit fraction with 1024 meaning m = 1. The 100 MHz
// clock, the 10 kHz rate, the bus widths and the rated values (1500 rpm,
// m = 928, step 18) follow the document; the fixed-point scalings are read from
// the printed simulation values and are this design's interpretation.
package svpwm_pkg;

  localparam int unsigned CLK_HZ      = 100_000_000; // system clock
  localparam int unsigned FS_HZ       = 10_000;      // switching / sampling rate
  localparam int unsigned TS_COUNTS   = CLK_HZ / FS_HZ;   // 10000 cycles per period

  localparam int unsigned ALPHA_FULL  = 3600;  // one revolution in 0.1 degree units
  localparam int unsigned SECTOR_SPAN = 600;   // 60 degrees

  localparam int SPEED_W = 11;  // speed(10:0), rpm
  localparam int INDEX_W = 10;  // index(9:0), modulation index, 1024 = 1.0
  localparam int STEP_W  = 8;   // variation(7:0), angle step per sample
  localparam int ALPHA_W = 12;  // alpha(11:0)
  localparam int COUNT_W = 14;  // count_ta1(13:0) and the other on-time counts

  typedef logic [SPEED_W-1:0] speed_t;
  typedef logic [INDEX_W-1:0] index_t;
  typedef logic [STEP_W-1:0]  step_t;
  typedef logic [ALPHA_W-1:0] alpha_t;
  typedef logic [COUNT_W-1:0] count_t;
  typedef logic [2:0]         sector_t;   // 1 .. 6

endpackage
