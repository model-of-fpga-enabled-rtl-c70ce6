// Alarm and buzzer drive.
//
// The alarm (the buzzer control signal) is high while the latest rate is above
// CRITICAL_BPM (80 bpm). While it is high, a clock divider toggles a tone
// signal every HALF_CYCLES cycles, giving a 2.5 Hz square wave at 50 MHz, and
// the buzzer is on during the tone's high half. When the alarm drops the
// divider is held at zero, so every alarm starts with a full high half-period.
// The threshold, the 2.5 Hz divider and "on during HIGH" follow the original system;
// the strict comparison and the divider restart are this design's reading.
// Timing: alarm follows bpm by one cycle, the buzzer by two.
module alarm_buzzer #(
  parameter int unsigned CRITICAL_BPM = bodymon_pkg::CRITICAL_BPM,
  parameter int unsigned HALF_CYCLES  = bodymon_pkg::BUZZ_HALF_CYCLES,
  parameter int unsigned RATE_W       = bodymon_pkg::RATE_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [RATE_W-1:0] bpm,
  output logic              alarm,
  output logic              buzzer
);

  localparam int unsigned DW = bodymon_pkg::cnt_w(HALF_CYCLES);
  logic [DW-1:0] div;
  logic          tone;

  always_ff @(posedge clk) begin
    if (rst) begin
      alarm <= 1'b0;
      div   <= '0;
      tone  <= 1'b1;
    end else begin
      alarm <= (32'(bpm) > CRITICAL_BPM);
      if (!alarm) begin
        div  <= '0;
        tone <= 1'b1;
      end else if (div == DW'(HALF_CYCLES - 1)) begin
        div  <= '0;
        tone <= ~tone;
      end else begin
        div  <= div + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) buzzer <= 1'b0;
    else     buzzer <= alarm & tone;
  end

endmodule
