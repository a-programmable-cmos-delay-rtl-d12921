// Switch network between the counter and the stop-pulse decoder.
//
// In the original circuit each bit position has a pair of CMOS transmission
// gates controlled by one bit of the programmed code: the gate pair passes
// the counter bit b[i] to the decoder input when code[i] is 1 and the
// complemented bit b_n[i] when code[i] is 0. Every decoder input is
// therefore 1 exactly when that counter bit matches the code bit. Here the
// gate pair is written as a two-way selection per bit.
//
// Interface: b, b_n (counter bits, both polarities), code (the programmed
// word); output sel[i] = code[i] ? b[i] : b_n[i]. Purely combinational.
module tg_switch_network #(
  parameter int unsigned W = cdl_pkg::CODE_W
) (
  input  logic [W-1:0] b,
  input  logic [W-1:0] b_n,
  input  logic [W-1:0] code,
  output logic [W-1:0] sel
);

  always_comb begin
    for (int unsigned i = 0; i < W; i++) begin
      sel[i] = code[i] ? b[i] : b_n[i];
    end
  end

endmodule
