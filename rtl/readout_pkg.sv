// readout_pkg: constants and types shared by the readout electronics.
//
// The whole design runs from one clock. CLK_MHZ is that clock (100 MHz, a
// choice of this design, fine enough to express the 20 ns latch gate and the
// 50 ns proportional-chamber pulses as whole cycles). The 20 MHz quartz
// clock that the coordinate scalers count is derived from it as a clock
// enable. Computer words are 16 bits wide; scalers and accumulators have a
// capacity of 2^14. An event is a fixed-format record of 336 words:
// 25 chamber blocks of 12 scaler words (6 X, 6 Y) followed by three
// groups of 12 words each: accumulators, proportional chambers, fixed data.
package readout_pkg;

  localparam int unsigned CLK_MHZ        = 100;
  localparam int unsigned WORD_W         = 16;
  localparam int unsigned SCALER_W       = 14;
  localparam int unsigned N_SPARKS       = 6;
  localparam int unsigned WORDS_PER_GRP  = 12;
  localparam int unsigned N_BURSTS       = 25;
  localparam int unsigned CH_WORDS       = N_BURSTS * WORDS_PER_GRP;       // 300
  localparam int unsigned EVENT_WORDS    = CH_WORDS + 3 * WORDS_PER_GRP;   // 336
  localparam int unsigned WCNT_W         = 9;

  // Two complementary words that mark the event produced by the CLEAR
  // TRIGGER at the end of a spill (values chosen by this design).
  localparam logic [WORD_W-1:0] MAGIC_WORD = 16'hA5C3;

  typedef logic [WORD_W-1:0]   word_t;
  typedef logic [SCALER_W-1:0] count_t;

  // "group" signals of the READOUT unit
  typedef enum logic [2:0] {
    GRP_NONE     = 3'd0,
    GRP_CHAMBERS = 3'd1,
    GRP_ACCUM    = 3'd2,
    GRP_PROP     = 3'd3,
    GRP_FIXED    = 3'd4
  } group_e;

  // source of an accepted trigger
  typedef enum logic [1:0] {
    TRIG_REAL    = 2'd0,
    TRIG_MONITOR = 2'd1,
    TRIG_CLEAR   = 2'd2
  } trig_kind_e;

  // microseconds / nanoseconds to clock cycles
  function automatic int unsigned us2cyc(int unsigned us, int unsigned mhz);
    return us * mhz;
  endfunction

  function automatic int unsigned ns2cyc(int unsigned ns, int unsigned mhz);
    return (ns * mhz + 999) / 1000;
  endfunction

endpackage
