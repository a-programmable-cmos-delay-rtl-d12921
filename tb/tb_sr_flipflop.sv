// Self-checking testbench for sr_flipflop.
// Random set and reset inputs, changed away from the active edge; the
// expected state is kept in the testbench: reset clears, else set sets,
// else hold. Checks q and q_n after every edge.
module tb_sr_flipflop;
  logic clk = 0, rst_n = 0, s = 0, r = 0, q, q_n;
  logic exp_q = 0;
  int checks = 0, failures = 0;
  int both = 0;

  sr_flipflop dut (.clk, .rst_n, .s, .r, .q, .q_n);

  always #1 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #0.1;
    checks++;
    if (q !== 1'b0) begin failures++; $display("q not cleared by reset"); end
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      s = $urandom % 3 == 0;
      r = $urandom % 4 == 0;
      if (s && r) both++;
      @(posedge clk);
      if (r) exp_q = 1'b0;
      else if (s) exp_q = 1'b1;
      #0.1;
      checks++;
      if (q !== exp_q || q_n !== ~exp_q) begin
        failures++;
        $display("s=%b r=%b q=%b q_n=%b expected %b", s, r, q, q_n, exp_q);
      end
    end
    checks++;
    if (both == 0) begin failures++; $display("set and reset never together"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
