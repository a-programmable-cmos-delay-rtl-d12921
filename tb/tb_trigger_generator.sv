// Self-checking testbench for trigger_generator.
// Drives P_IN with random high and low runs (changed on the falling clock
// edge) and records the level sampled at every rising edge. After rising
// edge n, TRG_P' must be low exactly when P_IN was sampled high at edge
// n-S and low at edge n-S-1 (S synchroniser stages): one cycle per leading
// edge, S+1 edges after the first sample.
module tb_trigger_generator;
  localparam int unsigned S = 2;
  logic clk = 0, rst_n = 0, p_in = 0, trg_p_n;
  int checks = 0, failures = 0;
  int pulses = 0;
  logic hist[$];

  trigger_generator #(.SYNC_STAGES(S)) dut (.clk, .rst_n, .p_in, .trg_p_n);

  always #1 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int run;
    logic lvl;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    lvl = 0;
    run = 0;
    for (int n = 0; n < 5000; n++) begin
      // next P_IN level, held for a random run of 1..6 cycles
      if (run == 0) begin
        lvl = ~lvl;
        run = 1 + $urandom % 6;
      end
      run--;
      p_in = lvl;
      @(posedge clk);
      hist.push_back(p_in);
      @(negedge clk);
      if (hist.size() > S + 1) begin
        logic exp_low;
        exp_low = hist[hist.size() - 1 - S] && !hist[hist.size() - 2 - S];
        checks++;
        if (trg_p_n !== !exp_low) begin
          failures++;
          $display("edge %0d: trg_p_n=%b expected %b", n, trg_p_n, !exp_low);
        end
        if (exp_low) pulses++;
      end
    end
    checks++;
    if (pulses < 100) begin failures++; $display("too few triggers: %0d", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
