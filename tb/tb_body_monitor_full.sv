// Full-size run of the monitoring system with its nominal settings.
//
// Both boards run at 50 MHz (20 ns). The
// pulse source gives 12 pulses, one every 0.6 s, in the first 8 s window, so
// the rate is 12 * 60 / 8 = 90 bpm, above the critical 80. The test follows
// one complete operation: the rate register after exactly 400,000,000 cycles,
// the alarm, the control wire rising 5,000,000 cycles into the second window,
// one I2C write lasting 116 quarter periods of 125 cycles (100 kHz), the
// clinical end storing 90, the PC line "00090\r\n" at 9600 baud (5208 cycles
// per bit) and the buzzer's first high half-period of 10,000,000 cycles
// (2.5 Hz).
module tb_body_monitor_full;
  logic clk_p = 1'b0, clk_c = 1'b0, rst_p = 1'b1, rst_c = 1'b1, pulse_in = 1'b0;
  logic buzzer, alarm, uart_txd, scl, sda, ctrl, bpm_valid, i2c_busy, i2c_done;
  logic i2c_nack, rate_valid, addr_match;
  logic [6:0] seg_p, seg_c;
  logic [3:0] an_p;
  logic [7:0] an_c;
  logic [15:0] bpm, rate_c;
  int checks = 0, failures = 0, n_stored = 0;
  longint unsigned cyc = 0;

  body_monitor_top dut (.*);

  // both 50 MHz clocks toggle at the same instants, which halves the number
  // of simulated time steps; unrelated clocks are covered by the short test
  always #10 begin clk_p = ~clk_p; clk_c = ~clk_c; end
  always @(posedge clk_p) cyc <= cyc + 1;
  // the clinical end stores the rate before the master reports done
  always @(posedge clk_c) if (!rst_c && rate_valid) n_stored <= n_stored + 1;
  // first falling edge of the buzzer
  logic buz_q = 1'b0;
  longint unsigned t_buz = 0;
  always @(posedge clk_p) begin
    buz_q <= buzzer;
    if (!rst_p && buz_q && !buzzer && t_buz == 0) t_buz <= cyc;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // watchdog: 440,000,000 patient clock periods
  initial begin
    #(64'd440_000_000 * 20);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pulse source, timed in ns: first pulse at 0.3 s, then every 0.6 s
  initial begin
    @(negedge rst_p);
    #(64'd15_000_000 * 20);
    for (int p = 0; p < 12; p++) begin
      pulse_in = 1'b1;
      #(64'd5_000_000 * 20);                   // 0.1 s high
      pulse_in = 1'b0;
      #(64'd25_000_000 * 20);
    end
  end

  // PC-side receiver, 5208 cycles per bit
  byte rx [$];
  initial begin
    logic [7:0] b;
    @(negedge rst_c);
    forever begin
      @(negedge uart_txd);
      #(2604 * 20);
      for (int i = 0; i < 8; i++) begin #(5208 * 20); b[i] = uart_txd; end
      #(5208 * 20);
      rx.push_back(b);
    end
  end

  initial begin
    longint unsigned t_reset, t_win, t_ctrl, t_start, t_done, t_alarm;
    string got;
    fork
      begin repeat (3) @(posedge clk_p); rst_p <= 1'b0; end
      begin repeat (3) @(posedge clk_c); rst_c <= 1'b0; end
    join
    t_reset = cyc;
    @(posedge bpm_valid); @(negedge clk_p);
    t_win = cyc;
    $display("window ended after %0d cycles, rate %0d", t_win - t_reset, bpm);
    check(bpm == 16'd90, $sformatf("rate %0d expected 90", bpm));
    check(t_win - t_reset >= 400_000_000 && t_win - t_reset <= 400_000_002, "8 s window");
    // the alarm, the control wire and busy may rise on the same edge as the
    // event before them, so each is awaited as a level
    wait (alarm); @(negedge clk_p);
    t_alarm = cyc;
    wait (ctrl); @(negedge clk_p);
    t_ctrl = cyc;
    check(t_ctrl - t_win >= 4_999_998 && t_ctrl - t_win <= 5_000_002, $sformatf("control after %0d cycles", t_ctrl - t_win));
    wait (i2c_busy); @(negedge clk_p);
    t_start = cyc;
    @(posedge i2c_done); @(negedge clk_p);
    t_done = cyc;
    check(t_done - t_start >= 14_498 && t_done - t_start <= 14_502, $sformatf("transfer took %0d cycles", t_done - t_start));
    check(!i2c_nack, "transfer acknowledged");
    check(n_stored == 1, $sformatf("clinical end stored %0d rates", n_stored));
    check(rate_c == 16'd90, $sformatf("clinical rate %0d", rate_c));
    wait (rx.size() == 7);
    got = "";
    foreach (rx[i]) got = {got, string'(rx[i])};
    check(got == "00090\r\n", $sformatf("PC line '%s'", got));
    // buzzer: first high half-period started within two cycles of the alarm
    wait (t_buz != 0);
    check(t_buz - t_alarm >= 9_999_997 && t_buz - t_alarm <= 10_000_003, $sformatf("buzzer high %0d cycles", t_buz - t_alarm));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
