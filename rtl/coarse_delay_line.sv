// Programmable coarse delay line with adjustable duty cycle.
//
// Every leading edge of the periodic input P_IN produces one output pulse
// on P_OUT that starts T_dC clock periods later and lasts T_W clock
// periods. Both are 10-bit codes, so at a 500 MHz clock each can be set
// from 0 to 1023 steps of 2 ns, about 2 us. Instead of a chain of 1000
// clocked latches tapped at the wanted position, the delay and the width
// are each timed by one counter that a decoder stops at the programmed
// value, which keeps area and power small.
//
// Three blocks in a chain:
//   trigger_generator      P_IN leading edge -> one-cycle TRG_P' (active low)
//   delay_generator        TRG_P' -> P_D low for T_dC cycles, then STOP_P_D
//   duty_cycle_controller  STOP_P_D -> P_OUT high for T_W cycles, then
//                          STOP_P_W; counts only while P_D is high
//
// Interface: clk (counter clock), rst_n (asynchronous, active low), p_in,
// t_dc and t_w (codes, to be held stable while a pulse is in flight);
// outputs p_out and, for observation, trg_p_n, p_d, stop_p_d, stop_p_w.
// Timing: with P_IN sampled high first at clock edge E, P_OUT rises at edge
// E + SYNC_STAGES + 1 + t_dc and falls t_w edges later. The constant
// SYNC_STAGES + 1 cycles (6 ns at 500 MHz with two synchroniser stages)
// are the line's intrinsic delay, a fixed offset to subtract from the
// measured delay. T_dC + T_W must not exceed the input period; otherwise
// the pulse runs into the next cycle's delay interval, the controller
// pauses while P_D is low, and that next cycle's pulse is absorbed.
module coarse_delay_line #(
  parameter int unsigned W           = cdl_pkg::CODE_W,
  parameter int unsigned SYNC_STAGES = cdl_pkg::SYNC_STAGES
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         p_in,
  input  logic [W-1:0] t_dc,
  input  logic [W-1:0] t_w,
  output logic         p_out,
  output logic         trg_p_n,
  output logic         p_d,
  output logic         stop_p_d,
  output logic         stop_p_w
);

  trigger_generator #(.SYNC_STAGES(SYNC_STAGES)) u_trg (
    .clk     (clk),
    .rst_n   (rst_n),
    .p_in    (p_in),
    .trg_p_n (trg_p_n)
  );

  delay_generator #(.W(W)) u_dly (
    .clk      (clk),
    .rst_n    (rst_n),
    .trg_p_n  (trg_p_n),
    .t_dc     (t_dc),
    .p_d      (p_d),
    .stop_p_d (stop_p_d)
  );

  duty_cycle_controller #(.W(W)) u_dcc (
    .clk      (clk),
    .rst_n    (rst_n),
    .p_d      (p_d),
    .stop_p_d (stop_p_d),
    .t_w      (t_w),
    .p_out    (p_out),
    .stop_p_w (stop_p_w)
  );

endmodule
