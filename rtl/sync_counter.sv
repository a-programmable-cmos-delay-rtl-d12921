// Synchronous up-counter that times one interval of the delay line.
//
// The counter advances by one on every clock edge at which `en` is high and
// returns to zero at the edge at which `clr_n` is low; clearing wins over
// counting. In the original circuit the counter runs on a gated clock (the
// system clock enabled by the SR flip-flop output) and is cleared through
// its active-low reset; here the gated clock is a count enable on the one
// system clock, which keeps the whole design in a single clock domain.
// Both polarities of every bit are brought out, b and b_n, because the
// stop-pulse decoder selects one of the two per bit.
//
// Interface: clk, asynchronous active-low rst_n (power-on), synchronous
// active-low clear clr_n, enable en; outputs b[W-1:0] and b_n = ~b.
// Timing: b is a register, b_n its inverse; wrap-around from 2^W-1 to 0.
module sync_counter #(
  parameter int unsigned W = cdl_pkg::CODE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr_n,
  input  logic         en,
  output logic [W-1:0] b,
  output logic [W-1:0] b_n
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      b <= '0;
    else if (!clr_n) b <= '0;
    else if (en)     b <= b + 1'b1;
  end

  assign b_n = ~b;

endmodule
