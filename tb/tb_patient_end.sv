// Self-checking test of patient_end with short intervals.
//
// A pulse train gives a known number of pulses in each counting window, so the
// rates are known in advance (pulses * 60 / 8). A behavioural slave on the
// open-drain bus acknowledges every byte and records each transfer. Checked:
// the rate register after every window; the alarm and a toggling buzzer only
// for rates above 80; that the control wire rises at the control instant of
// the second window; that a transfer starts at the control instant of a window
// only when the previous window's rate is above 80 (the default gating), and
// carries address 1001001 with R/W = 0 and that rate; and that the display's
// lowest digit shows the rate's last decimal digit.
module tb_patient_end;
  localparam int unsigned W = 2000, CTRL = 100, Q = 4;
  logic clk = 1'b0, rst = 1'b1, pulse_in = 1'b0;
  logic scl_oe, sda_oe, ctrl_out, buzzer, alarm, bpm_valid, i2c_busy, i2c_done, i2c_nack;
  logic [6:0] seg;
  logic [3:0] an;
  logic [15:0] bpm;
  logic slave_pull = 1'b0;
  wire  scl = ~scl_oe;
  wire  sda = ~(sda_oe | slave_pull);
  int checks = 0, failures = 0;

  patient_end #(
    .WINDOW_CYCLES(W), .SAMPLE_SECONDS(8), .CTRL_CYCLES(CTRL), .CRITICAL_BPM(80),
    .BUZZ_HALF_CYCLES(10), .I2C_QUARTER_CYCLES(Q), .REFRESH_CYCLES(4), .DIGITS(4)
  ) dut (
    .clk, .rst, .pulse_in, .sda_in(sda), .scl_oe, .sda_oe, .ctrl_out, .buzzer, .alarm,
    .seg, .an, .bpm, .bpm_valid, .i2c_busy, .i2c_done, .i2c_nack
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- behavioural slave ----
  logic scl_q = 1'b1, sda_q = 1'b1;
  int nbits = 0, nbyte = 0;
  logic [7:0] cur;
  logic [23:0] frame;
  bit acking = 1'b0;
  int frames [$];
  int start_cycle [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    scl_q <= scl; sda_q <= sda;
    if (scl && scl_q && sda != sda_q) begin
      if (!sda) begin nbits = 0; nbyte = 0; start_cycle.push_back(cyc); end
      else if (nbyte == 3) frames.push_back(int'(frame));
    end
    if (scl && !scl_q) begin
      if (nbits % 9 != 8) cur = {cur[6:0], sda};
      nbits++;
      if (nbits % 9 == 8) begin frame = {frame[15:0], cur}; nbyte++; end
    end
    if (!scl && scl_q) begin
      if (acking) begin slave_pull <= 1'b0; acking = 1'b0; end
      else if (nbits % 9 == 8 && nbits > 0) begin slave_pull <= 1'b1; acking = 1'b1; end
    end
  end

  // ---- pulse source: npulses[k] pulses inside window k ----
  int npulses [6] = '{12, 8, 20, 4, 11, 0};
  initial begin
    @(negedge rst);
    foreach (npulses[k]) begin
      int gap;
      gap = (W - 40) / (npulses[k] + 1);
      for (int p = 0; p < npulses[k]; p++) begin
        repeat (gap - 5) @(posedge clk);
        pulse_in <= 1'b1;
        repeat (5) @(posedge clk);
        pulse_in <= 1'b0;
      end
      repeat (W - (npulses[k] * gap)) @(posedge clk);
    end
  end

  int toggles = 0;
  logic buzzer_q = 1'b0;
  always @(posedge clk) begin
    buzzer_q <= buzzer;
    if (buzzer != buzzer_q) toggles++;
    if (!alarm) check(buzzer == 1'b0 || buzzer_q == 1'b1, "buzzer silent without alarm");
  end

  int exp_frames [$];
  initial begin
    int window_end [$];
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int k = 0; k < 5; k++) begin
      int rate, t0;
      rate = npulses[k] * 60 / 8;
      @(posedge clk iff bpm_valid);
      t0 = cyc;
      check(bpm == 16'(rate), $sformatf("window %0d rate %0d expected %0d", k, bpm, rate));
      toggles = 0;
      repeat (CTRL + 2) @(posedge clk);
      check(alarm == (rate > 80), $sformatf("alarm for rate %0d", rate));
      check(ctrl_out == 1'b1, "control wire high from the second window");
      check(i2c_busy == (rate > 80), $sformatf("transfer running only above 80 (rate %0d)", rate));
      if (rate > 80) begin
        exp_frames.push_back({8'b1001001_0, 16'(rate)});
        check(start_cycle.size() > 0 && start_cycle[$] - t0 >= CTRL - 2 && start_cycle[$] - t0 <= CTRL + 3,
              "transfer starts at the control instant");
      end
      repeat (600) @(posedge clk);
      if (rate > 80) check(toggles > 10, "buzzer toggling while alarm");
      else check(toggles == 0 || toggles == 1, "buzzer quiet");
      begin
        int d0;
        d0 = -1;
        for (int i = 0; i < 8; i++) begin
          @(posedge clk);
          if (!an[0]) case (~seg)
            7'b0111111: d0 = 0; 7'b0000110: d0 = 1; 7'b1011011: d0 = 2; 7'b1001111: d0 = 3;
            7'b1100110: d0 = 4; 7'b1101101: d0 = 5; 7'b1111101: d0 = 6; 7'b0000111: d0 = 7;
            7'b1111111: d0 = 8; 7'b1101111: d0 = 9; default: d0 = -2;
          endcase
        end
        check(d0 == rate % 10, $sformatf("display digit 0 shows %0d for %0d", d0, rate));
      end
    end
    check(frames.size() == exp_frames.size(), $sformatf("%0d transfers, expected %0d", frames.size(), exp_frames.size()));
    foreach (exp_frames[i]) if (i < frames.size())
      check(frames[i] == exp_frames[i], $sformatf("transfer %0d: %h expected %h", i, frames[i], exp_frames[i]));
    check(!i2c_nack, "no nack");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
