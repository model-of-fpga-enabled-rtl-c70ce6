// Self-checking test of uart_tx with a short bit time.
//
// Random bytes are sent back to back. A reference receiver waits for the
// falling start edge, samples every bit in its middle and checks the start bit,
// the eight data bits (LSB first) and the stop bit. The test also checks that
// each frame keeps ready low for exactly 10 bit times and that the line idles
// high.
module tb_uart_tx;
  localparam int unsigned DIV = 8;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] data = '0;
  logic valid = 1'b0, ready, txd;
  int checks = 0, failures = 0;
  logic [7:0] sent [$];

  uart_tx #(.BAUD_DIV(DIV)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference receiver
  int received = 0;
  initial begin
    logic [7:0] b;
    @(negedge rst);
    forever begin
      @(posedge clk iff txd == 1'b0);
      repeat (DIV / 2) @(posedge clk);
      check(txd == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (DIV) @(posedge clk);
        b[i] = txd;
      end
      repeat (DIV) @(posedge clk);
      check(txd == 1'b1, "stop bit");
      check(sent.size() > 0 && b == sent[0], $sformatf("received %h", b));
      if (sent.size() > 0) void'(sent.pop_front());
      received++;
    end
  end

  initial begin
    int busy_cycles;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (5) @(posedge clk);
    check(txd == 1'b1 && ready, "idle high and ready");
    for (int n = 0; n < 40; n++) begin
      logic [7:0] d;
      d = 8'($urandom);
      if (n == 0) d = 8'h55;
      @(posedge clk iff ready);
      data <= d; valid <= 1'b1; sent.push_back(d);
      @(posedge clk);
      valid <= 1'b0;
      busy_cycles = 0;
      #1;
      while (!ready) begin @(posedge clk); #1; busy_cycles++; end
      check(busy_cycles == 10 * DIV, $sformatf("frame took %0d cycles", busy_cycles));
      if (n % 5 == 4) repeat ($urandom_range(1, 30)) @(posedge clk);
    end
    repeat (3 * DIV) @(posedge clk);
    check(received == 40, $sformatf("received %0d bytes", received));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
