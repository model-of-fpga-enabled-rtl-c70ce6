// Pulse counter: heart pulses per minute from an 8 s counting window.
//
// A free-running clock counter measures the window: it counts clock cycles from
// 0 to WINDOW_CYCLES-1 and then wraps. In parallel a second counter counts the
// rising edges of the sensor output (after a two-flop synchroniser, since the
// sensor is asynchronous). At the last cycle of the window the pulse count is
// scaled to a minute, bpm = count * 60 / SAMPLE_SECONDS (truncated), stored in
// the bpm register, and both counters start again from zero.
//
// Interface: clk_count is the position in the window; window_done is high on
// the window's last cycle, and bpm_valid for one cycle right after it, when bpm
// first holds the new rate. bpm keeps the last window's rate (0 after reset).
// Counting the window, scaling to a minute and restarting follow the original
// system; the synchroniser, the edge detection and the 8 s default
// (8 x 50,000,000 cycles, preferred over a 40,000,000-cycle count quoted with
// it, which would be 0.8 s) are this design's reading.
module pulse_counter
#(
  parameter int unsigned WINDOW_CYCLES  = bodymon_pkg::WINDOW_CYCLES,
  parameter int unsigned SAMPLE_SECONDS = bodymon_pkg::SAMPLE_SECONDS,
  parameter int unsigned RATE_W         = bodymon_pkg::RATE_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              pulse_in,
  output logic [31:0]       clk_count,
  output logic              window_done,
  output logic [RATE_W-1:0] bpm,
  output logic              bpm_valid
);

  logic [2:0] sync;            // two synchroniser stages plus the previous level
  logic       pulse_edge;
  logic [RATE_W-1:0] pulses;
  logic [RATE_W+6-1:0] scaled;

  always_ff @(posedge clk) begin
    if (rst) sync <= '0;
    else     sync <= {sync[1:0], pulse_in};
  end
  assign pulse_edge = sync[1] & ~sync[2];

  assign window_done = (clk_count == WINDOW_CYCLES - 1);

  // Pulses including one that arrives on the last cycle, scaled to a minute
  always_comb begin
    scaled = ({6'd0, pulses} + (RATE_W+6)'(pulse_edge)) * (RATE_W+6)'(60);
    scaled = scaled / (RATE_W+6)'(SAMPLE_SECONDS);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_count <= '0;
      pulses    <= '0;
      bpm       <= '0;
      bpm_valid <= 1'b0;
    end else begin
      bpm_valid <= 1'b0;
      if (window_done) begin
        clk_count <= '0;
        pulses    <= '0;
        bpm       <= (scaled > (RATE_W+6)'({RATE_W{1'b1}})) ? {RATE_W{1'b1}} : scaled[RATE_W-1:0];
        bpm_valid <= 1'b1;
      end else begin
        clk_count <= clk_count + 32'd1;
        if (pulse_edge && pulses != {RATE_W{1'b1}}) pulses <= pulses + 1'b1;
      end
    end
  end

endmodule
