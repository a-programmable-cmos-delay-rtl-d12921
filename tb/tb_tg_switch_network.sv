// Self-checking testbench for tg_switch_network.
// Applies random counter words (with b_n both the true complement and an
// independent random word) and random codes; the expected decoder input is
// worked out bit by bit as "code bit 1 passes b, code bit 0 passes b_n".
module tb_tg_switch_network;
  localparam int unsigned W = 10;
  logic [W-1:0] b, b_n, code, sel;
  int checks = 0, failures = 0;

  tg_switch_network #(.W(W)) dut (.b, .b_n, .code, .sel);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      b    = W'($urandom);
      b_n  = (i % 2 == 0) ? ~b : W'($urandom);
      code = W'($urandom);
      #1;
      for (int k = 0; k < W; k++) begin
        logic exp_bit;
        if (code[k] == 1'b1) exp_bit = b[k];
        else                 exp_bit = b_n[k];
        checks++;
        if (sel[k] !== exp_bit) begin
          failures++;
          $display("bit %0d: b=%b b_n=%b code=%b sel=%b", k, b, b_n, code, sel);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
