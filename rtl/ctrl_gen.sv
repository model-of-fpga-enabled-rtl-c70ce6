// Control-signal generator for the clinical end.
//
// Every counting window restarts the clock counter from zero. Once the first
// window has completed, the control instant is the cycle on which the clock
// counter reaches CTRL_CYCLES (5,000,000 cycles, 0.1 s at 50 MHz) in every
// following window. ctrl_pulse is high for that one cycle and starts the I2C
// transfer; ctrl_level, the wire to the clinical board, rises at the first
// control instant and stays high until reset. The instant and the
// "second window onward" rule follow the original system; the split into a pulse and a
// level is this design's choice.
module ctrl_gen #(
  parameter int unsigned CTRL_CYCLES = bodymon_pkg::CTRL_CYCLES
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] clk_count,
  input  logic        window_done,
  output logic        ctrl_level,
  output logic        ctrl_pulse
);

  logic seen_window;   // at least one full window has been counted

  assign ctrl_pulse = seen_window && (clk_count == CTRL_CYCLES);

  always_ff @(posedge clk) begin
    if (rst) begin
      seen_window <= 1'b0;
      ctrl_level  <= 1'b0;
    end else begin
      if (window_done) seen_window <= 1'b1;
      if (ctrl_pulse)  ctrl_level  <= 1'b1;
    end
  end

endmodule
