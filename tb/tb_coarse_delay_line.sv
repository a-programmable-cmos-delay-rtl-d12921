// End-to-end testbench for coarse_delay_line at its default parameters
// (10-bit codes, two synchroniser stages), with a 2 ns clock period so that
// one code step is 2 ns as at the nominal 500 MHz.
//
// P_IN is a 2 ns pulse repeated with period T_C. For every P_IN pulse the
// testbench predicts, independently of the design, the clock edge at which
// P_OUT must rise (first edge that samples P_IN high + 3 intrinsic cycles +
// T_dC) and fall (T_W edges later) and compares with the edges recorded by
// a monitor. The runs follow the published operating points:
//   - minimum step and near-maximum delay with a minimum width
//     (codes 1 and 996, width 1), T_C = 2000 ns;
//   - delay 186 ns / width 414 ns (codes 93 / 207) and delay 994 ns /
//     width 998 ns (codes 497 / 499) at T_C = 2000 ns, the second using
//     almost the whole period;
//   - a sweep of the delay code from 0 to 1000 in steps of 50 and the
//     largest code 1023, checking that the delay is exactly linear in the
//     code;
//   - random delay/width/period triples that obey the period rule, with
//     P_IN pulses 1 to 3 cycles wide;
//   - zero delay and zero width;
//   - a mis-programmed line with T_dC + T_W > T_C, where the controller
//     pauses while P_D is low and absorbs the next cycle's pulse.
// Each mechanism is counted; one that never happens counts as a failure.
module tb_coarse_delay_line;
  import cdl_pkg::*;
  localparam longint INTRINSIC = longint'(SYNC_STAGES) + 1;

  logic clk = 0, rst_n = 0, p_in = 0;
  logic [CODE_W-1:0] t_dc = '0, t_w = '0;
  logic p_out, trg_p_n, p_d, stop_p_d, stop_p_w;

  int checks = 0, failures = 0;
  longint n = 0;                       // rising edges so far
  longint rises[$], falls[$], exp_rises[$], exp_falls[$];
  int n_trig = 0, n_delay = 0, n_zero_delay = 0, n_zero_width = 0;
  int n_pause = 0, n_max_code = 0;

  coarse_delay_line dut (
    .clk, .rst_n, .p_in, .t_dc, .t_w,
    .p_out, .trg_p_n, .p_d, .stop_p_d, .stop_p_w
  );

  always #1 clk = ~clk;   // 2 ns period: 500 MHz

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: edge count and P_OUT transitions, plus mechanism counters.
  logic p_out_q = 0, p_d_q = 1;
  always @(posedge clk) begin
    n <= n + 1;
    #0.1;
    if (p_out && !p_out_q) rises.push_back(n);
    if (!p_out && p_out_q) falls.push_back(n);
    if (!p_d && p_d_q) n_delay++;
    p_out_q = p_out;
    p_d_q   = p_d;
  end
  always @(negedge clk) begin
    if (rst_n && !trg_p_n) n_trig++;
    if (rst_n && stop_p_d && stop_p_w) n_zero_width++;
    if (rst_n && !p_d && p_out) n_pause++;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Apply npulses P_IN pulses with period tc (cycles) and the given codes;
  // predict the P_OUT edges when the line is correctly programmed.
  task automatic burst(input int unsigned dc, input int unsigned w,
                       input int unsigned tc, input int npulses, input bit predict);
    @(negedge clk);
    t_dc = CODE_W'(dc);
    t_w  = CODE_W'(w);
    for (int i = 0; i < npulses; i++) begin
      longint e;
      p_in = 1;
      e = n + 1;                       // the edge that first samples P_IN high
      if (predict && w != 0) begin
        exp_rises.push_back(e + INTRINSIC + longint'(dc));
        exp_falls.push_back(e + INTRINSIC + longint'(dc) + longint'(w));
      end
      @(negedge clk);
      p_in = 0;
      repeat (tc - 1) @(negedge clk);
    end
    repeat (int'(INTRINSIC) + 4) @(negedge clk);
  endtask

  // As burst, but with a P_IN pulse of pw cycles: still one trigger each.
  task automatic burst_wide(input int unsigned dc, input int unsigned w,
                            input int unsigned tc, input int npulses, input int pw);
    @(negedge clk);
    t_dc = CODE_W'(dc);
    t_w  = CODE_W'(w);
    for (int i = 0; i < npulses; i++) begin
      longint e;
      p_in = 1;
      e = n + 1;
      exp_rises.push_back(e + INTRINSIC + longint'(dc));
      exp_falls.push_back(e + INTRINSIC + longint'(dc) + longint'(w));
      repeat (pw) @(negedge clk);
      p_in = 0;
      repeat (tc - pw) @(negedge clk);
    end
    repeat (int'(INTRINSIC) + 4) @(negedge clk);
  endtask

  task automatic compare(input string what);
    check(rises.size() == exp_rises.size() && falls.size() == exp_falls.size(),
          $sformatf("%s: %0d/%0d pulses, expected %0d", what, rises.size(), falls.size(),
                    exp_rises.size()));
    for (int i = 0; i < exp_rises.size() && i < rises.size() && i < falls.size(); i++) begin
      check(rises[i] == exp_rises[i],
            $sformatf("%s: rise at edge %0d, expected %0d", what, rises[i], exp_rises[i]));
      check(falls[i] == exp_falls[i],
            $sformatf("%s: fall at edge %0d, expected %0d", what, falls[i], exp_falls[i]));
    end
    rises.delete(); falls.delete(); exp_rises.delete(); exp_falls.delete();
  endtask

  initial begin
    int unsigned tc_ns;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(p_out == 0 && p_d == 1 && trg_p_n == 1, "idle after reset");

    // T_C = 2000 ns = 1000 cycles
    burst(1, 1, 1000, 2, 1);     compare("delay code 1, width 1");
    burst(996, 1, 1000, 2, 1);   compare("delay code 996, width 1");
    burst(93, 207, 1000, 2, 1);  compare("delay 186 ns, width 414 ns");
    burst(497, 499, 1000, 2, 1); compare("delay 994 ns, width 998 ns");

    // linearity sweep of the delay code, width 1
    for (int c = 0; c <= 1000; c += 50) begin
      longint e0;
      e0 = n + 2;   // burst waits one cycle before raising P_IN
      burst(c, 1, 1010, 1, 1);
      if (rises.size() == 1) begin
        check(rises[0] - e0 == INTRINSIC + longint'(c),
              $sformatf("sweep code %0d: delay %0d ps", c, longint'(STEP_PS) * (rises[0] - e0)));
        if (c == 0) n_zero_delay++;
      end
      compare($sformatf("sweep code %0d", c));
    end

    // largest code: 2^10 - 1 steps
    burst(1023, 1, 1030, 1, 1);  compare("delay code 1023");
    n_max_code++;

    // random programming that obeys the period rule, P_IN 1 to 3 cycles wide
    for (int i = 0; i < 25; i++) begin
      int unsigned dc, w, tc;
      dc = $urandom % 1024;
      w  = 1 + $urandom % 1023;
      tc = dc + w + int'(INTRINSIC) + 2 + $urandom % 50;
      burst_wide(dc, w, tc, 2, 1 + $urandom % 3);
      compare($sformatf("random codes %0d/%0d, period %0d", dc, w, tc));
    end

    // zero width: no output pulse at all
    burst(100, 0, 200, 2, 1);    compare("width 0");

    // mis-programmed: T_dC + T_W = 110 cycles > T_C = 100 cycles.
    // The first pulse is stretched by the 20 disabled cycles of the next
    // delay interval; the second cycle's pulse is absorbed.
    begin
      longint e0;
      e0 = n + 2;   // burst waits one cycle before raising P_IN
      burst(20, 90, 100, 2, 0);
      repeat (150) @(negedge clk);
      exp_rises.push_back(e0 + INTRINSIC + 20);
      exp_falls.push_back(e0 + INTRINSIC + 20 + 90 + 20);
      compare("overlapping programming");
    end

    $display("triggers=%0d delay_intervals=%0d zero_delay=%0d zero_width=%0d pause_cycles=%0d",
             n_trig, n_delay, n_zero_delay, n_zero_width, n_pause);
    check(n_trig > 0, "trigger generated");
    check(n_delay > 0, "delay interval run");
    check(n_zero_delay > 0, "zero delay run");
    check(n_zero_width > 0, "zero width run");
    check(n_pause > 0, "controller paused by P_D");
    check(n_max_code > 0, "largest code run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
