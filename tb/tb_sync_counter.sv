// Self-checking testbench for sync_counter.
// Drives random enable and clear patterns, plus a long run that wraps the
// counter, and compares b and b_n each cycle with an integer reference
// count kept modulo 2^W in the testbench.
module tb_sync_counter;
  localparam int unsigned W = 10;
  logic clk = 0, rst_n = 0, clr_n = 1, en = 0;
  logic [W-1:0] b, b_n;
  int checks = 0, failures = 0;
  int unsigned ref_cnt = 0;
  int wraps = 0;

  sync_counter #(.W(W)) dut (.clk, .rst_n, .clr_n, .en, .b, .b_n);

  always #1 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic c_n, input logic e);
    @(negedge clk);
    clr_n = c_n; en = e;
    @(posedge clk);
    if (!c_n) ref_cnt = 0;
    else if (e) begin
      if (ref_cnt == (1 << W) - 1) begin ref_cnt = 0; wraps++; end
      else ref_cnt = ref_cnt + 1;
    end
    #0.1;
    checks++;
    if (b !== ref_cnt[W-1:0] || b_n !== ~ref_cnt[W-1:0]) begin
      failures++;
      $display("mismatch: b=%0d b_n=%0h expected %0d", b, b_n, ref_cnt);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++)
      step(($urandom % 16) != 0, ($urandom % 4) != 0);
    step(1'b0, 1'b1);
    for (int i = 0; i < (1 << W) + 5; i++) step(1'b1, 1'b1);
    checks++;
    if (wraps == 0) begin failures++; $display("counter never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
