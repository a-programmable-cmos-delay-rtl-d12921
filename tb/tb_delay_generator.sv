// Self-checking testbench for delay_generator.
// For each delay code (0, 1, 2, the 10-bit maximum, the codes of the
// published examples and random ones) it applies a one-cycle active-low
// start and measures how many cycles P_D stays low; that must equal the
// code, and STOP_P_D must be high in exactly the last low cycle (in the
// start cycle itself for code 0). A second start issued in the middle of
// a running interval must not change its length.
module tb_delay_generator;
  localparam int unsigned W = 10;
  logic clk = 0, rst_n = 0, trg_p_n = 1;
  logic [W-1:0] t_dc = '0;
  logic p_d, stop_p_d;
  int checks = 0, failures = 0;
  int retrig = 0;

  delay_generator #(.W(W)) dut (.clk, .rst_n, .trg_p_n, .t_dc, .p_d, .stop_p_d);

  always #1 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (code %0d)", msg, t_dc); end
  endtask

  // One interval with the given code; retrig_at > 0 fires a second start
  // that many cycles into the interval.
  task automatic run(input int unsigned code, input int retrig_at);
    int low, stops;
    @(negedge clk);
    t_dc = W'(code);
    trg_p_n = 0;
    #0.1;
    check(stop_p_d == (code == 0), "stop in start cycle");
    @(negedge clk);
    trg_p_n = 1;
    low = 0; stops = 0;
    while (p_d == 0 && low < 5000) begin
      low++;
      check(stop_p_d == (low == code), "stop position");
      if (stop_p_d) stops++;
      @(negedge clk);
      if (low == retrig_at) begin trg_p_n = 0; retrig++; end
      else trg_p_n = 1;
    end
    trg_p_n = 1;
    #0.1;
    check(low == code, "P_D low length");
    if (code != 0) check(stops == 1, "one stop pulse");
    check(stop_p_d == 0, "no stop after interval");
    repeat (3) begin
      @(negedge clk);
      check(p_d == 1 && stop_p_d == 0, "idle after interval");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(p_d == 1 && stop_p_d == 0, "idle after reset");
    run(0, 0); run(1, 0); run(2, 0); run((1 << W) - 1, 0);
    run(93, 0); run(497, 0); run(996, 0);
    run(40, 10); run(300, 299);
    for (int i = 0; i < 20; i++) run($urandom % (1 << W), 0);
    check(retrig == 2, "retriggers issued");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
