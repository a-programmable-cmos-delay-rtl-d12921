// Self-checking testbench for stop_pulse_decoder.
// For a set of codes (0, 1, the maximum and random ones) sweeps every
// counter value with arm high and low; stop must be 1 only for an armed
// counter that equals the code.
module tb_stop_pulse_decoder;
  localparam int unsigned W = 10;
  logic [W-1:0] b, b_n, code;
  logic arm, stop;
  int checks = 0, failures = 0;

  stop_pulse_decoder #(.W(W)) dut (.b, .b_n, .code, .arm, .stop);
  assign b_n = ~b;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned codes[8];
    codes = '{0, 1, (1 << W) - 1, 93, 207, 497, 996, 0};
    codes[7] = $urandom % (1 << W);
    foreach (codes[c]) begin
      code = W'(codes[c]);
      for (int v = 0; v < (1 << W); v++) begin
        for (int a = 0; a < 2; a++) begin
          b = W'(v); arm = a[0];
          #1;
          checks++;
          if (stop !== (a == 1 && v == codes[c])) begin
            failures++;
            $display("code=%0d count=%0d arm=%0d stop=%b", codes[c], v, a, stop);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
