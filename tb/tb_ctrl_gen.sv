// Self-checking test of ctrl_gen driven by a model window counter.
//
// The clock counter wraps every WIN cycles. The test checks that no control
// pulse occurs in the first window, that from the second window on exactly one
// pulse occurs per window at count CTRL, and that the control level rises at
// the first pulse and stays high.
module tb_ctrl_gen;
  localparam int unsigned WIN = 300, CTRL = 50;
  logic clk = 1'b0, rst = 1'b1;
  logic [31:0] clk_count;
  logic window_done, ctrl_level, ctrl_pulse;
  int checks = 0, failures = 0;
  int window = 0, pulses_in_window = 0;

  ctrl_gen #(.CTRL_CYCLES(CTRL)) dut (.*);

  always #5 clk = ~clk;
  assign window_done = (clk_count == WIN - 1);
  always_ff @(posedge clk) begin
    if (rst) clk_count <= '0;
    else clk_count <= window_done ? '0 : clk_count + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (ctrl_pulse) begin
      pulses_in_window++;
      check(clk_count == CTRL, "pulse at the control count");
      check(window >= 1, "no pulse in the first window");
    end
    if (window == 0) check(ctrl_level == 1'b0, "level low in first window");
    if (window >= 2) check(ctrl_level == 1'b1, "level stays high");
    if (window_done) begin
      if (window >= 1) check(pulses_in_window == 1, $sformatf("window %0d had %0d pulses", window, pulses_in_window));
      pulses_in_window = 0;
      window++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (window == 6);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
