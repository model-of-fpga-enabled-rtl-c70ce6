// Clinical end: receives the pulse rate over I2C, shows it and reports it.
//
// The I2C slave (address SLAVE_ADDR) receives two-byte writes. When a write
// completes while the control wire from the patient end is high, the rate is
// stored in a register, shown on the DIGITS-digit display and sent to the PC
// over the UART (9600 baud) as a line of decimal text. Writes that arrive
// while the control wire is low are ignored, and so is a write that completes
// while the previous report is still being sent. SDA is open drain (sda_oe
// pulls it low); the slave never drives SCL. A master that reads from the
// address gets the stored rate back (two bytes, upper first). Receiving,
// storing, displaying and forwarding follow the original system; gating by the
// control wire, the read-back and the report format are this design's choices.
module clinical_end
#(
  parameter logic [6:0]  SLAVE_ADDR     = bodymon_pkg::SLAVE_ADDR,
  parameter int unsigned BAUD_DIV       = bodymon_pkg::BAUD_DIV,
  parameter int unsigned REFRESH_CYCLES = 50_000,
  parameter int unsigned DIGITS         = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              scl_in,
  input  logic              sda_in,
  input  logic              ctrl_in,
  output logic              sda_oe,
  output logic [6:0]        seg,
  output logic [DIGITS-1:0] an,
  output logic              txd,
  output logic [bodymon_pkg::RATE_W-1:0] rate,
  output logic              rate_valid,
  output logic              addr_match
);

  logic [bodymon_pkg::RATE_W-1:0] rx_data;
  logic              rx_valid, rep_busy;
  logic [1:0]        ctrl_sync;

  always_ff @(posedge clk) begin
    if (rst) ctrl_sync <= '0;
    else     ctrl_sync <= {ctrl_sync[0], ctrl_in};
  end

  i2c_slave #(.ADDR(SLAVE_ADDR), .NBYTES(bodymon_pkg::NBYTES)) u_slave (
    .clk, .rst, .scl_in, .sda_in, .sda_oe, .addr_match,
    .data(rx_data), .data_valid(rx_valid), .rd_data(rate)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      rate       <= '0;
      rate_valid <= 1'b0;
    end else begin
      rate_valid <= 1'b0;
      if (rx_valid && ctrl_sync[1] && !rep_busy) begin
        rate       <= rx_data;
        rate_valid <= 1'b1;
      end
    end
  end

  seven_seg #(.DIGITS(DIGITS), .REFRESH_CYCLES(REFRESH_CYCLES), .VAL_W(bodymon_pkg::RATE_W)) u_disp (
    .clk, .rst, .value(rate), .seg, .an
  );

  uart_reporter #(.BAUD_DIV(BAUD_DIV), .VAL_W(bodymon_pkg::RATE_W)) u_report (
    .clk, .rst, .value(rate), .send(rate_valid), .busy(rep_busy), .txd
  );

endmodule
