// Duty-cycle controller: produces the programmable output pulse width T_W.
//
// It is built from the same parts as the delay generator. STOP_P_D, the end
// of the delay interval, sets the SR flip-flop, whose true output is the
// delay line's output P_OUT; the 10-bit counter then advances once per
// clock, and when it equals the pulse-width code t_w the stop-pulse decoder
// issues STOP_P_W, which resets the flip-flop and clears the counter. P_OUT
// is therefore high for t_w clock periods.
//
// The delay generator's P_D is the enable: while P_D is low (during a delay
// interval) the counter holds its value, so a pulse that would overlap the
// next delay interval is stretched by the disabled cycles instead of being
// timed across them. This only happens when T_dC + T_W exceeds the input
// period; a correctly programmed line never sees it. Holding the count is
// this design's reading of "enable"; the start cycle always counts, so the
// width does not depend on P_D being still low in the cycle of STOP_P_D.
// A STOP_P_D that arrives while a pulse is still high is ignored (the set
// flip-flop stays set) and does not advance the count.
// With t_w = 0 STOP_P_W coincides with STOP_P_D and no pulse is produced.
// The gated clock of the original circuit is a count enable here, and its
// SR latch a clocked flip-flop. The flip-flop's inverted output is not
// needed here and is left open.
//
// Interface: clk, rst_n (asynchronous, active low), p_d (enable), stop_p_d
// (active-high start), t_w (width code); outputs p_out and stop_p_w.
// Timing: start sampled at edge E; p_out high from E+1 to E+1+t_w when
// enabled throughout; stop_p_w high in the last cycle of p_out.
module duty_cycle_controller #(
  parameter int unsigned W = cdl_pkg::CODE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         p_d,
  input  logic         stop_p_d,
  input  logic [W-1:0] t_w,
  output logic         p_out,
  output logic         stop_p_w
);

  logic         start;
  logic         q;
  logic [W-1:0] b, b_n;
  logic         run;

  assign start = stop_p_d;
  assign run   = q | start;

  sync_counter #(.W(W)) u_cnt (
    .clk   (clk),
    .rst_n (rst_n),
    .clr_n (run & ~stop_p_w),
    .en    ((start & ~q) | (q & p_d)),
    .b     (b),
    .b_n   (b_n)
  );

  stop_pulse_decoder #(.W(W)) u_dec (
    .b    (b),
    .b_n  (b_n),
    .code (t_w),
    .arm  (run),
    .stop (stop_p_w)
  );

  sr_flipflop u_sr (
    .clk   (clk),
    .rst_n (rst_n),
    .s     (start),
    .r     (stop_p_w),
    .q     (q),
    .q_n   ()
  );

  assign p_out = q;

endmodule
