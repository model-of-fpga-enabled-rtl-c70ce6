// Self-checking test of alarm_buzzer with a short tone period.
//
// The rate is stepped through values below, at and above the critical value.
// The test checks the alarm (strictly above 80), that the buzzer stays off
// without the alarm, and that with the alarm it is a square wave whose high and
// low halves last HALF cycles each.
module tb_alarm_buzzer;
  localparam int unsigned HALF = 20;
  logic clk = 1'b0, rst = 1'b1;
  logic [15:0] bpm = '0;
  logic alarm, buzzer;
  int checks = 0, failures = 0;

  alarm_buzzer #(.CRITICAL_BPM(80), .HALF_CYCLES(HALF)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_rate(input int r);
    int run, level, halves;
    bpm <= 16'(r);
    repeat (3) @(posedge clk);
    check(alarm == (r > 80), $sformatf("alarm for %0d", r));
    run = 0; level = buzzer; halves = 0;
    for (int i = 0; i < 8 * HALF; i++) begin
      @(posedge clk);
      if (r <= 80) check(buzzer == 1'b0, $sformatf("buzzer off for %0d", r));
      else if (buzzer == level) run++;
      else begin
        if (halves > 0) check(run + 1 == HALF, $sformatf("half period %0d", run + 1));
        halves++; run = 0; level = buzzer;
      end
    end
    if (r > 80) check(halves >= 6, "buzzer toggles");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    run_rate(60);
    run_rate(80);
    run_rate(81);
    run_rate(72);
    run_rate(150);
    run_rate(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
