// Trigger generator: turns each leading edge of the input P_IN into a start
// pulse for the delay generator.
//
// P_IN is an external periodic signal with no fixed phase to the clock, so
// it first passes a SYNC_STAGES-deep synchroniser. A further flip-flop keeps
// the previous synchronised level; a 0-to-1 step between the two is the
// leading edge. The start pulse TRG_P' is active low, one clock cycle long,
// and comes from a register, so it is glitch-free and aligned to the clock
// edge at which the delay generator's counter sits at count zero. How the
// edge is detected and synchronised is this design's choice; that the block
// detects the leading edge and issues an active-low trigger is the
// original architecture's.
//
// Interface: clk, asynchronous active-low rst_n, p_in; output trg_p_n.
// SYNC_STAGES must be at least 1; 2 is the default.
// Timing: trg_p_n is low for exactly one cycle, SYNC_STAGES + 1 clock edges
// after the first edge that samples P_IN high. P_IN must stay low for at
// least one clock cycle between pulses for the next edge to be seen. A P_IN
// that is already high when reset is released counts as a leading edge.
module trigger_generator #(
  parameter int unsigned SYNC_STAGES = cdl_pkg::SYNC_STAGES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic p_in,
  output logic trg_p_n
);

  logic [SYNC_STAGES-1:0] sync_q;
  logic                   prev_q;
  logic                   lead_edge;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q  <= '0;
      prev_q  <= 1'b0;
      trg_p_n <= 1'b1;
    end else begin
      sync_q[0] <= p_in;
      for (int unsigned i = 1; i < SYNC_STAGES; i++) sync_q[i] <= sync_q[i-1];
      prev_q    <= sync_q[SYNC_STAGES-1];
      trg_p_n   <= ~lead_edge;
    end
  end

  assign lead_edge = sync_q[SYNC_STAGES-1] & ~prev_q;

endmodule
