// Self-checking test of i2c_start_stop_det.
//
// SCL and SDA are driven through a random mix of data bits (SDA changes only
// while SCL is low), START and STOP conditions. A reference model counts the
// events on the driven lines; the test checks that the detector reports the
// same number of START, STOP, rising and falling SCL events, that each START
// and STOP is reported three cycles after the bus edge, and that the
// synchronised lines follow the bus.
module tb_i2c_start_stop_det;
  logic clk = 1'b0, rst = 1'b1;
  logic scl = 1'b1, sda = 1'b1;
  logic scl_s, sda_s, start, stop, scl_rise, scl_fall;
  int checks = 0, failures = 0;
  int n_start = 0, n_stop = 0, n_rise = 0, n_fall = 0;
  int e_start = 0, e_stop = 0, e_rise = 0, e_fall = 0;
  int cyc = 0, last_start_edge = -100, last_stop_edge = -100;

  i2c_start_stop_det dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (start) begin n_start++; check(cyc - last_start_edge == 3, $sformatf("START latency %0d", cyc - last_start_edge)); end
    if (stop)  begin n_stop++;  check(cyc - last_stop_edge == 3, $sformatf("STOP latency %0d", cyc - last_stop_edge)); end
    if (scl_rise) n_rise++;
    if (scl_fall) n_fall++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hold(); repeat (2 + $urandom_range(0, 4)) @(posedge clk); endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (5) @(posedge clk);
    for (int k = 0; k < 200; k++) begin
      int kind;
      kind = $urandom_range(0, 3);
      // SCL is high here
      if (kind == 0 && sda) begin           // START
        sda <= 1'b0; last_start_edge = cyc + 1; e_start++; hold();
      end else if (kind == 1 && !sda) begin // STOP
        sda <= 1'b1; last_stop_edge = cyc + 1; e_stop++; hold();
      end else begin                        // a data bit
        scl <= 1'b0; e_fall++; hold();
        sda <= 1'($urandom_range(0, 1)); hold();
        scl <= 1'b1; e_rise++; hold();
        repeat (2) @(posedge clk);
        check(scl_s == scl && sda_s == sda, "synchronised lines follow the bus");
      end
    end
    repeat (5) @(posedge clk);
    check(n_start == e_start, $sformatf("START count %0d expected %0d", n_start, e_start));
    check(n_stop == e_stop, $sformatf("STOP count %0d expected %0d", n_stop, e_stop));
    check(n_rise == e_rise, $sformatf("rise count %0d expected %0d", n_rise, e_rise));
    check(n_fall == e_fall, $sformatf("fall count %0d expected %0d", n_fall, e_fall));
    check(e_start > 5 && e_stop > 5, "enough START and STOP events");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
