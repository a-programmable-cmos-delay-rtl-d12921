// Delay generator: produces the programmable coarse delay T_dC.
//
// A start pulse (TRG_P' low) sets the SR flip-flop; while it is set, its
// inverted output P_D is low and the 10-bit counter advances once per
// clock. The stop-pulse decoder compares the counter with the programmed
// delay code t_dc through the transmission-gate network; on a match it
// issues STOP_P_D, which resets the flip-flop and clears the counter. The
// low phase of P_D therefore lasts t_dc clock periods, one step being
// 1/f_clock (2 ns at 500 MHz) and the full range 2^10 steps (about 2 us).
// STOP_P_D is passed on as the start pulse of the duty-cycle controller,
// and P_D as its enable.
//
// Counting: the counter also advances in the cycle of the start pulse, so
// in the k-th cycle that P_D is low it holds k, and the match on k = t_dc
// falls in the last low cycle. With t_dc = 0 the idle counter (at zero)
// already matches in the start cycle: STOP_P_D coincides with the start
// and P_D never goes low. A start that arrives while an interval is
// running is ignored, as it would be by a set latch. The counter's gated
// clock of the original circuit is a count enable here, and its SR latch
// is a clocked flip-flop; both are this design's choices.
//
// Interface: clk, rst_n (asynchronous, active low), trg_p_n (active-low
// start), t_dc (delay code); outputs p_d and stop_p_d (one-cycle pulse).
// Timing: start sampled at edge E; p_d low from E+1 to E+1+t_dc;
// stop_p_d high in the cycle before p_d returns high (in the start cycle
// itself for t_dc = 0).
module delay_generator #(
  parameter int unsigned W = cdl_pkg::CODE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         trg_p_n,
  input  logic [W-1:0] t_dc,
  output logic         p_d,
  output logic         stop_p_d
);

  logic         start;
  logic         q, q_n;
  logic [W-1:0] b, b_n;
  logic         run;

  assign start = ~trg_p_n;
  assign run   = q | start;

  sync_counter #(.W(W)) u_cnt (
    .clk   (clk),
    .rst_n (rst_n),
    .clr_n (run & ~stop_p_d),
    .en    (run),
    .b     (b),
    .b_n   (b_n)
  );

  stop_pulse_decoder #(.W(W)) u_dec (
    .b    (b),
    .b_n  (b_n),
    .code (t_dc),
    .arm  (run),
    .stop (stop_p_d)
  );

  sr_flipflop u_sr (
    .clk   (clk),
    .rst_n (rst_n),
    .s     (start),
    .r     (stop_p_d),
    .q     (q),
    .q_n   (q_n)
  );

  assign p_d = q_n;

  // The stop pulse ends the interval: it lasts one cycle.
  a_stop_one_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    stop_p_d |=> !stop_p_d || start);

endmodule
