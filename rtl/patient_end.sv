// Patient end (self monitoring): measures the pulse rate and sends it over I2C.
//
// pulse_counter counts sensor pulses over each counting window and stores the
// rate in beats per minute. The rate is shown on a DIGITS-digit display and
// compared with the critical value by alarm_buzzer, which sounds the buzzer at
// 2.5 Hz while it is exceeded. ctrl_gen marks the instant 0.1 s into every
// window from the second one on: it raises the control wire to the clinical
// end and starts the I2C master, which writes the 16-bit rate to the slave as
// two bytes. With SEND_ONLY_ALARM set (the default) a transfer is started only
// while the alarm is on, as in the system's flow diagram; cleared, every window
// is sent. The I2C lines are open drain (scl_oe/sda_oe pull low); sda_in is
// the SDA bus level. The block structure follows the original system; the
// parameter names and the choice to start the master at the control instant
// are this design's.
module patient_end
#(
  parameter int unsigned WINDOW_CYCLES      = bodymon_pkg::WINDOW_CYCLES,
  parameter int unsigned SAMPLE_SECONDS     = bodymon_pkg::SAMPLE_SECONDS,
  parameter int unsigned CTRL_CYCLES        = bodymon_pkg::CTRL_CYCLES,
  parameter int unsigned CRITICAL_BPM       = bodymon_pkg::CRITICAL_BPM,
  parameter int unsigned BUZZ_HALF_CYCLES   = bodymon_pkg::BUZZ_HALF_CYCLES,
  parameter int unsigned I2C_QUARTER_CYCLES = bodymon_pkg::I2C_QUARTER_CYCLES,
  parameter logic [6:0]  SLAVE_ADDR         = bodymon_pkg::SLAVE_ADDR,
  parameter int unsigned REFRESH_CYCLES     = 50_000,
  parameter int unsigned DIGITS             = 4,
  parameter bit          SEND_ONLY_ALARM    = 1'b1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              pulse_in,
  input  logic              sda_in,
  output logic              scl_oe,
  output logic              sda_oe,
  output logic              ctrl_out,
  output logic              buzzer,
  output logic              alarm,
  output logic [6:0]        seg,
  output logic [DIGITS-1:0] an,
  output logic [bodymon_pkg::RATE_W-1:0] bpm,
  output logic              bpm_valid,
  output logic              i2c_busy,
  output logic              i2c_done,
  output logic              i2c_nack
);

  logic [31:0] clk_count;
  logic        window_done, ctrl_pulse;

  pulse_counter #(
    .WINDOW_CYCLES(WINDOW_CYCLES), .SAMPLE_SECONDS(SAMPLE_SECONDS), .RATE_W(bodymon_pkg::RATE_W)
  ) u_count (
    .clk, .rst, .pulse_in, .clk_count, .window_done, .bpm, .bpm_valid
  );

  ctrl_gen #(.CTRL_CYCLES(CTRL_CYCLES)) u_ctrl (
    .clk, .rst, .clk_count, .window_done, .ctrl_level(ctrl_out), .ctrl_pulse
  );

  alarm_buzzer #(
    .CRITICAL_BPM(CRITICAL_BPM), .HALF_CYCLES(BUZZ_HALF_CYCLES), .RATE_W(bodymon_pkg::RATE_W)
  ) u_alarm (
    .clk, .rst, .bpm, .alarm, .buzzer
  );

  seven_seg #(.DIGITS(DIGITS), .REFRESH_CYCLES(REFRESH_CYCLES), .VAL_W(bodymon_pkg::RATE_W)) u_disp (
    .clk, .rst, .value(bpm), .seg, .an
  );

  i2c_master #(
    .QUARTER_CYCLES(I2C_QUARTER_CYCLES), .ADDR(SLAVE_ADDR), .NBYTES(bodymon_pkg::NBYTES)
  ) u_i2c (
    .clk, .rst,
    .start(ctrl_pulse && (alarm || !SEND_ONLY_ALARM)), .rw(1'b0),
    .data(bpm), .sda_in, .scl_oe, .sda_oe,
    .busy(i2c_busy), .done(i2c_done), .nack(i2c_nack), .rdata()
  );

endmodule
