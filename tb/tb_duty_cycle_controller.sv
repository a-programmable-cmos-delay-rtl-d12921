// Self-checking testbench for duty_cycle_controller.
// For each width code it applies a one-cycle STOP_P_D start and measures
// how many cycles P_OUT stays high. With P_D (the enable) high throughout,
// that must equal the code and STOP_P_W must mark the last high cycle; for
// code 0 no pulse is produced and STOP_P_W coincides with the start. With
// P_D pulled low for D cycles inside the pulse, the pulse must be
// stretched to code + D cycles (the window ends before the count reaches
// the code). A start issued while the pulse is high
// must not change it.
module tb_duty_cycle_controller;
  localparam int unsigned W = 10;
  logic clk = 0, rst_n = 0, p_d = 1, stop_p_d = 0;
  logic [W-1:0] t_w = '0;
  logic p_out, stop_p_w;
  int checks = 0, failures = 0;
  int paused = 0;

  duty_cycle_controller #(.W(W)) dut (.clk, .rst_n, .p_d, .stop_p_d, .t_w, .p_out, .stop_p_w);

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
    if (!cond) begin failures++; $display("FAIL: %s (code %0d)", msg, t_w); end
  endtask

  // dis_at/dis_len: P_D low for dis_len cycles starting dis_at cycles into
  // the pulse; extra_at > 0 issues a second start that far into the pulse.
  task automatic run(input int unsigned code, input int dis_at, input int dis_len,
                     input int extra_at);
    int hi, stops, expect_len;
    @(negedge clk);
    t_w = W'(code);
    stop_p_d = 1;
    p_d = 0;            // as in the delay line: start in the last P_D-low cycle
    #0.1;
    check(stop_p_w == (code == 0), "stop in start cycle");
    @(negedge clk);
    stop_p_d = 0;
    p_d = 1;
    hi = 0; stops = 0;
    while (p_out == 1 && hi < 5000) begin
      hi++;
      if (stop_p_w) stops++;
      @(negedge clk);
      p_d = !(dis_len > 0 && hi >= dis_at && hi < dis_at + dis_len);
      stop_p_d = (hi == extra_at);
    end
    p_d = 1; stop_p_d = 0;
    expect_len = (code == 0) ? 0 : code + dis_len;
    check(hi == expect_len, "P_OUT high length");
    if (dis_len > 0 && hi == expect_len) paused++;
    if (code != 0) check(stops == 1, "one stop pulse");
    repeat (3) begin
      @(negedge clk);
      check(p_out == 0 && stop_p_w == 0, "idle after pulse");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(p_out == 0 && stop_p_w == 0, "idle after reset");
    run(0, 0, 0, 0); run(1, 0, 0, 0); run(2, 0, 0, 0); run((1 << W) - 1, 0, 0, 0);
    run(207, 0, 0, 0); run(499, 0, 0, 0);
    run(50, 10, 7, 0); run(100, 1, 30, 0); run(3, 1, 5, 0);
    run(60, 0, 0, 20);
    for (int i = 0; i < 20; i++) run(1 + $urandom % ((1 << W) - 1), 0, 0, 0);
    check(paused == 3, "enable pauses exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
