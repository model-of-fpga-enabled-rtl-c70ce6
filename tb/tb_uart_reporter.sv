// Self-checking test of uart_reporter.
//
// For several values the test pulses send and decodes the serial line with a
// reference receiver; each report must be five decimal digits (computed here
// by integer division) followed by CR and LF, take 70 bit times, and keep busy
// high until the last stop bit has gone out (70 bit times plus one cycle per
// character for the hand-over).
module tb_uart_reporter;
  localparam int unsigned DIV = 6;
  logic clk = 1'b0, rst = 1'b1;
  logic [15:0] value = '0;
  logic send = 1'b0, busy, txd;
  int checks = 0, failures = 0;
  byte rx [$];

  uart_reporter #(.BAUD_DIV(DIV)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    @(negedge rst);
    forever begin
      @(posedge clk iff txd == 1'b0);
      repeat (DIV / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (DIV) @(posedge clk);
        b[i] = txd;
      end
      repeat (DIV) @(posedge clk);
      check(txd == 1'b1, "stop bit");
      rx.push_back(b);
    end
  end

  int vals [5] = '{84, 0, 65535, 1203, 90};
  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (5) @(posedge clk);
    foreach (vals[k]) begin
      int cyc;
      string want, got;
      rx.delete();
      value <= 16'(vals[k]); send <= 1'b1;
      @(posedge clk);
      send <= 1'b0; value <= 16'hFFFF;       // the value is captured at send
      cyc = 0;
      #1;
      while (busy) begin @(posedge clk); #1; cyc++; end
      check(cyc >= 70 * DIV + 7 && cyc <= 70 * DIV + 9, $sformatf("report took %0d cycles", cyc));
      repeat (DIV) @(posedge clk);
      want = $sformatf("%05d\r\n", vals[k]);
      got = "";
      foreach (rx[i]) got = {got, string'(rx[i])};
      check(got == want, $sformatf("report for %0d: '%s'", vals[k], got));
      repeat ($urandom_range(0, 10)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
