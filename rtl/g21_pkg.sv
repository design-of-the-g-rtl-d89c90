// g21_pkg: shared sizes and timing of the G-21 memory system.
//
// The design runs on a single clock of four ticks per microsecond. The
// processors' own 1 MHz two-phase clock is represented by a two-bit phase
// count (ph = 0..3, one tick each); the queue controls and portals decide at
// microsecond boundaries, as the processor logic does, while the quarter
// microsecond resolution places the module pulses where the module timing
// chart puts them.
//
// Module timing is counted in ticks from the first tick on which a module sees
// its start line high. A processor starts a module on the second quarter of a
// microsecond (0.25 us), so tick c is at 0.25 + c/4 us:
//   c = 3        internal start (1.0 us): address latched, word read
//   c = 6        write word sampled (1.75 us, inside the 2 us allowed)
//   c = 7..14    read lines driven (2.0 .. 4.0 us)
//   c = 12..13   data available (3.25 .. 3.75 us)
//   c = 20..21   finish cycle (5.25 .. 5.75 us, 1.5 us before completion)
//   c >= 22      a new start is accepted (contiguous access)
//   c = 27       last tick of the cycle (completion at 7.0 us)
// Module count, word count and word width are the document's; the tick
// resolution and these exact tick numbers are this design's reading of the
// timing charts.
package g21_pkg;

  localparam int unsigned N_MODULES    = 8;     // memory modules on the processor bus
  localparam int unsigned MOD_W        = 3;     // module select bits
  localparam int unsigned ADDR_W       = 13;    // word address inside a module
  localparam int unsigned WORDS        = 8192;  // words per module
  localparam int unsigned DATA_W       = 32;    // memory word
  localparam int unsigned TICKS_PER_US = 4;
  // The last module is private: each processor sees its own 4K half of it,
  // the half being chosen by the processor number in the top address bit.
  localparam int unsigned PRIV_MOD     = N_MODULES - 1;

  localparam int unsigned C_INT_START  = 3;
  localparam int unsigned C_WDATA      = 6;
  localparam int unsigned C_RD_FIRST   = 7;
  localparam int unsigned C_RD_LAST    = 14;
  localparam int unsigned C_DAV_FIRST  = 12;
  localparam int unsigned C_DAV_LAST   = 13;
  localparam int unsigned C_FIN_FIRST  = 20;
  localparam int unsigned C_FIN_LAST   = 21;
  localparam int unsigned C_ACCEPT     = 22;
  localparam int unsigned C_LAST       = 27;

  // Owner of a module's core inside its portal.
  typedef enum logic [1:0] {
    OWN_NONE = 2'd0,
    OWN_HC   = 2'd1,   // high capacity terminal: the processor bus
    OWN_LD   = 2'd2,   // low demand terminal: general exchange
    OWN_CD   = 2'd3    // continuous demand terminal: display
  } portal_owner_e;

  // Sequencer of a processor's bus queue control.
  typedef enum logic [2:0] {
    QS_FREE = 3'd0,    // no access pending
    QS_PEND = 3'd1,    // access pending: idle or waiting for the bus
    QS_OWN  = 3'd2,    // holding the bus request, start issued
    QS_HOLD = 3'd3,    // bus busy microsecond
    QS_READ = 3'd4     // bus released, waiting for data available
  } qc_state_e;

endpackage
