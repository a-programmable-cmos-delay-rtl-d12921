// Stop-pulse decoder: flags the count that equals the programmed code.
//
// The transmission-gate network (tg_switch_network) sits inside the decoder
// and hands it, per bit, the counter bit or its complement as the code bit
// demands. The decoder then asserts `stop` when all of those inputs are 1,
// which is when the counter value equals the code. `arm` qualifies the
// match: the delay line only takes a match while its SR flip-flop is set,
// so an idle counter resting at zero never produces a stop for code 0.
//
// Interface: b, b_n (counter), code, arm; output stop.
// Timing: combinational; stop follows the counter register in the same cycle.
module stop_pulse_decoder #(
  parameter int unsigned W = cdl_pkg::CODE_W
) (
  input  logic [W-1:0] b,
  input  logic [W-1:0] b_n,
  input  logic [W-1:0] code,
  input  logic         arm,
  output logic         stop
);

  logic [W-1:0] sel;

  tg_switch_network #(.W(W)) u_tg (
    .b    (b),
    .b_n  (b_n),
    .code (code),
    .sel  (sel)
  );

  assign stop = arm & (&sel);

endmodule
