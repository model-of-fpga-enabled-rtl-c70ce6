// End-to-end test of the whole monitoring system with short intervals.
//
// The two boards run from unrelated clocks (10 ns and 13 ns periods). A pulse
// source gives a known number of pulses in each patient-end counting window;
// the expected rate of each window is pulses * 60 / 8. For every window the
// test checks the patient's rate register; then, for rates above 80, that the
// alarm and buzzer are on, that the rate crosses the I2C bus and reaches the
// clinical end's register and display, and that a UART line with the rate in
// decimal reaches the PC side (decoded here by a reference receiver); for rates
// up to 80, that no transfer happens. It counts how often each mechanism
// occurred (window end, alarm, buzzer tone, control signal, skipped transfer,
// I2C transfer with acknowledges, slave hand-over, UART report) and counts a
// failure for any that never did.
module tb_body_monitor_top;
  localparam int unsigned W = 6000, CTRL = 200, Q = 5, DIV = 8;
  logic clk_p = 1'b0, clk_c = 1'b0, rst_p = 1'b1, rst_c = 1'b1, pulse_in = 1'b0;
  logic buzzer, alarm, uart_txd, scl, sda, ctrl, bpm_valid, i2c_busy, i2c_done;
  logic i2c_nack, rate_valid, addr_match;
  logic [6:0] seg_p, seg_c;
  logic [3:0] an_p;
  logic [7:0] an_c;
  logic [15:0] bpm, rate_c;
  int checks = 0, failures = 0;

  body_monitor_top #(
    .WINDOW_CYCLES(W), .SAMPLE_SECONDS(8), .CTRL_CYCLES(CTRL), .CRITICAL_BPM(80),
    .BUZZ_HALF_CYCLES(12), .I2C_QUARTER_CYCLES(Q), .BAUD_DIV(DIV), .REFRESH_CYCLES(3)
  ) dut (.*);

  always #5 clk_p = ~clk_p;
  always #6.5 clk_c = ~clk_c;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (80000) @(posedge clk_p);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ----
  int n_window = 0, n_alarm = 0, n_tone = 0, n_ctrl = 0, n_skip = 0;
  int n_xfer = 0, n_ack = 0, n_handover = 0, n_report = 0;
  logic scl_q = 1'b1, sda_q = 1'b1, buzzer_q = 1'b0, alarm_q = 1'b0, ctrl_q = 1'b0;
  int bits = 0;
  always @(posedge clk_p) if (!rst_p) begin
    scl_q <= scl; sda_q <= sda; buzzer_q <= buzzer; alarm_q <= alarm; ctrl_q <= ctrl;
    if (bpm_valid) n_window++;
    if (alarm && !alarm_q) n_alarm++;
    if (buzzer && !buzzer_q) n_tone++;
    if (ctrl && !ctrl_q) n_ctrl++;
    if (i2c_done) n_xfer++;
    if (scl && scl_q && !sda && sda_q) bits = 0;
    if (scl && !scl_q) begin
      bits++;
      if (bits % 9 == 0 && !sda) n_ack++;
    end
  end
  always @(posedge clk_c) if (!rst_c && rate_valid) n_handover++;

  // ---- reference UART receiver on the PC side (clinical clock) ----
  byte rx [$];
  initial begin
    logic [7:0] b;
    @(negedge rst_c);
    forever begin
      @(posedge clk_c iff uart_txd == 1'b0);
      repeat (DIV / 2) @(posedge clk_c);
      for (int i = 0; i < 8; i++) begin repeat (DIV) @(posedge clk_c); b[i] = uart_txd; end
      repeat (DIV) @(posedge clk_c);
      rx.push_back(b);
      if (b == 8'h0A) n_report++;
    end
  end

  // ---- pulse sensor model ----
  int npulses [6] = '{12, 8, 20, 4, 11, 14};
  initial begin
    @(negedge rst_p);
    foreach (npulses[k]) begin
      int gap;
      gap = (W - 50) / (npulses[k] + 1);
      for (int p = 0; p < npulses[k]; p++) begin
        repeat (gap - 7) @(posedge clk_p);
        pulse_in <= 1'b1;
        repeat (7) @(posedge clk_p);
        pulse_in <= 1'b0;
      end
      repeat (W - npulses[k] * gap) @(posedge clk_p);
    end
  end

  function automatic int seg_digit(input logic [6:0] s);
    case (~s)
      7'b0111111: return 0; 7'b0000110: return 1; 7'b1011011: return 2; 7'b1001111: return 3;
      7'b1100110: return 4; 7'b1101101: return 5; 7'b1111101: return 6; 7'b0000111: return 7;
      7'b1111111: return 8; 7'b1101111: return 9; default: return -1;
    endcase
  endfunction

  initial begin
    int last_sent;
    last_sent = 0;
    fork
      begin repeat (3) @(posedge clk_p); rst_p <= 1'b0; end
      begin repeat (4) @(posedge clk_c); rst_c <= 1'b0; end
    join
    for (int k = 0; k < 5; k++) begin
      int rate, x0, d;
      string want, got;
      rate = npulses[k] * 60 / 8;
      @(posedge clk_p iff bpm_valid);
      check(bpm == 16'(rate), $sformatf("window %0d rate %0d expected %0d", k, bpm, rate));
      x0 = n_xfer;
      rx.delete();
      // control instant, transfer (116 quarters), report (70 bit times)
      repeat (CTRL + 116 * Q + 80 * DIV * 2) @(posedge clk_p);
      check(alarm == (rate > 80), $sformatf("alarm for %0d", rate));
      if (rate > 80) begin
        check(n_xfer == x0 + 1, "one transfer above the critical rate");
        check(rate_c == 16'(rate), $sformatf("clinical rate %0d expected %0d", rate_c, rate));
        want = $sformatf("%05d\r\n", rate);
        got = "";
        foreach (rx[i]) got = {got, string'(rx[i])};
        check(got == want, $sformatf("PC line for %0d: '%s'", rate, got));
        d = -1;
        for (int i = 0; i < 40; i++) begin @(posedge clk_c); if (!an_c[0]) d = seg_digit(seg_c); end
        check(d == rate % 10, $sformatf("clinical display digit 0 shows %0d", d));
        last_sent = rate;
      end else begin
        check(n_xfer == x0, "no transfer at or below the critical rate");
        check(rate_c == 16'(last_sent), "clinical rate keeps the last alarm value");
        check(rx.size() == 0, "no PC line");
        if (k > 0) n_skip++;
      end
      d = -1;
      for (int i = 0; i < 40; i++) begin @(posedge clk_p); if (!an_p[0]) d = seg_digit(seg_p); end
      check(d == rate % 10, $sformatf("patient display digit 0 shows %0d", d));
    end
    check(!i2c_nack, "no transfer left unacknowledged");
    check(n_window >= 5, $sformatf("window ends: %0d", n_window));
    check(n_alarm > 0, $sformatf("alarm episodes: %0d", n_alarm));
    check(n_tone > 0, $sformatf("buzzer tone periods: %0d", n_tone));
    check(n_ctrl == 1, $sformatf("control wire rises: %0d", n_ctrl));
    check(n_skip > 0, $sformatf("skipped transfers: %0d", n_skip));
    check(n_xfer > 0, $sformatf("I2C transfers: %0d", n_xfer));
    check(n_ack == 3 * n_xfer, $sformatf("acknowledges: %0d", n_ack));
    check(n_handover == n_xfer, $sformatf("slave hand-overs: %0d", n_handover));
    check(n_report == n_xfer, $sformatf("UART reports: %0d", n_report));
    $display("mechanisms: windows=%0d alarms=%0d tones=%0d ctrl=%0d skipped=%0d transfers=%0d acks=%0d handovers=%0d reports=%0d",
             n_window, n_alarm, n_tone, n_ctrl, n_skip, n_xfer, n_ack, n_handover, n_report);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
