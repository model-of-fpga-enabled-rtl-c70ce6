// Pulse-rate monitoring system: patient board and clinical board on one bus.
//
// The patient end (I2C master) measures the heart rate, shows it, sounds the
// alarm above the critical rate and writes the rate over I2C; the clinical end
// (I2C slave) stores, shows and forwards it to a PC over the UART. The two
// boards run from their own clocks (clk_p, clk_c, both nominally 50 MHz) and
// resets. The bus is modelled as open-drain lines with pull-ups: a line is
// low whenever any device pulls it low. scl, sda and ctrl bring the bus and
// control-wire levels out for observation, and the status pulses (bpm_valid,
// i2c_done, rate_valid) and flags (i2c_busy, i2c_nack, addr_match) can drive
// board LEDs. The parameters are the system's nominal settings; the
// per-cycle counts follow from them. The two boards, the control wire and the
// shared two-wire bus follow the original system; holding both boards in one
// module, with the open-drain bus written as logic, is this design's choice.
module body_monitor_top
#(
  parameter int unsigned WINDOW_CYCLES      = bodymon_pkg::WINDOW_CYCLES,
  parameter int unsigned SAMPLE_SECONDS     = bodymon_pkg::SAMPLE_SECONDS,
  parameter int unsigned CTRL_CYCLES        = bodymon_pkg::CTRL_CYCLES,
  parameter int unsigned CRITICAL_BPM       = bodymon_pkg::CRITICAL_BPM,
  parameter int unsigned BUZZ_HALF_CYCLES   = bodymon_pkg::BUZZ_HALF_CYCLES,
  parameter int unsigned I2C_QUARTER_CYCLES = bodymon_pkg::I2C_QUARTER_CYCLES,
  parameter int unsigned BAUD_DIV           = bodymon_pkg::BAUD_DIV,
  parameter logic [6:0]  SLAVE_ADDR         = bodymon_pkg::SLAVE_ADDR,
  parameter int unsigned REFRESH_CYCLES     = 50_000,
  parameter bit          SEND_ONLY_ALARM    = 1'b1
) (
  input  logic              clk_p,
  input  logic              rst_p,
  input  logic              clk_c,
  input  logic              rst_c,
  input  logic              pulse_in,
  output logic              buzzer,
  output logic              alarm,
  output logic [6:0]        seg_p,
  output logic [3:0]        an_p,
  output logic [6:0]        seg_c,
  output logic [7:0]        an_c,
  output logic              uart_txd,
  output logic              scl,
  output logic              sda,
  output logic              ctrl,
  output logic [bodymon_pkg::RATE_W-1:0] bpm,
  output logic [bodymon_pkg::RATE_W-1:0] rate_c,
  output logic              bpm_valid,
  output logic              i2c_busy,
  output logic              i2c_done,
  output logic              rate_valid,
  output logic              addr_match,
  output logic              i2c_nack
);

  logic m_scl_oe, m_sda_oe, s_sda_oe;

  // open-drain bus with pull-ups
  assign scl = ~m_scl_oe;
  assign sda = ~(m_sda_oe | s_sda_oe);

  patient_end #(
    .WINDOW_CYCLES(WINDOW_CYCLES), .SAMPLE_SECONDS(SAMPLE_SECONDS),
    .CTRL_CYCLES(CTRL_CYCLES), .CRITICAL_BPM(CRITICAL_BPM),
    .BUZZ_HALF_CYCLES(BUZZ_HALF_CYCLES), .I2C_QUARTER_CYCLES(I2C_QUARTER_CYCLES),
    .SLAVE_ADDR(SLAVE_ADDR), .REFRESH_CYCLES(REFRESH_CYCLES), .DIGITS(4),
    .SEND_ONLY_ALARM(SEND_ONLY_ALARM)
  ) u_patient (
    .clk(clk_p), .rst(rst_p), .pulse_in, .sda_in(sda),
    .scl_oe(m_scl_oe), .sda_oe(m_sda_oe), .ctrl_out(ctrl), .buzzer, .alarm,
    .seg(seg_p), .an(an_p), .bpm, .bpm_valid, .i2c_busy, .i2c_done, .i2c_nack
  );

  clinical_end #(
    .SLAVE_ADDR(SLAVE_ADDR), .BAUD_DIV(BAUD_DIV), .REFRESH_CYCLES(REFRESH_CYCLES), .DIGITS(8)
  ) u_clinical (
    .clk(clk_c), .rst(rst_c), .scl_in(scl), .sda_in(sda), .ctrl_in(ctrl),
    .sda_oe(s_sda_oe), .seg(seg_c), .an(an_c), .txd(uart_txd),
    .rate(rate_c), .rate_valid, .addr_match
  );

endmodule
