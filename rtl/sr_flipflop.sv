// Clocked SR flip-flop holding the "interval running" state.
//
// Set by the start pulse and reset by the stop pulse at the next clock
// edge; with both high, reset wins, so a zero-length interval (start and
// stop in the same cycle) leaves the flip-flop clear. In the original
// circuit this is an asynchronous SR latch; clocking it keeps the design in
// one clock domain and makes every interval an exact number of cycles.
//
// Interface: clk, asynchronous active-low rst_n, s, r; outputs q and q_n.
// Timing: q changes one clock edge after s or r is sampled.
module sr_flipflop (
  input  logic clk,
  input  logic rst_n,
  input  logic s,
  input  logic r,
  output logic q,
  output logic q_n
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (r)  q <= 1'b0;
    else if (s)  q <= 1'b1;
  end

  assign q_n = ~q;

endmodule
