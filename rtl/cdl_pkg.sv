// Shared constants of the programmable coarse delay line.
//
// The delay line measures both the output delay and the output pulse width
// in periods of one common clock. CODE_W is the width of the two programming
// words T_dC and T_W and of the counters that time them: 10 bits, so each
// interval can be programmed in 2^10 steps. At the nominal 500 MHz clock one
// step is 2 ns (DS = 1/f_clock) and the full range is 2^10 * 2 ns, about 2 us.
// The clock frequency is not a parameter of the logic; it is kept here for
// the testbenches, which convert cycle counts into nanoseconds.
package cdl_pkg;

  // Width of the delay code, the pulse-width code and both counters.
  localparam int unsigned CODE_W = 10;

  // Nominal counter clock in MHz and the resulting step in picoseconds.
  localparam int unsigned CLK_MHZ     = 500;
  localparam int unsigned STEP_PS     = 1_000_000 / CLK_MHZ;

  // Number of synchroniser stages in front of the input edge detector.
  localparam int unsigned SYNC_STAGES = 2;

endpackage
