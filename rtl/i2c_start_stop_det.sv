// I2C line receiver with START/STOP detection.
//
// SCL and SDA come from another clock domain (the bus), so each passes through
// two synchronising flip-flops; scl_s and sda_s are the results. Comparing them
// with their values one cycle earlier gives one-cycle pulses: scl_rise,
// scl_fall, start (SDA falls while SCL stays high) and stop (SDA rises while
// SCL stays high). Since data may change only while SCL is low, an SDA edge
// with SCL high can only be one of these conditions. The pulses come three
// cycles after the bus edge. The START/STOP definitions are the protocol's;
// the synchroniser depth is this design's choice. All registers reset to 1,
// the idle level of the bus.
module i2c_start_stop_det (
  input  logic clk,
  input  logic rst,
  input  logic scl,
  input  logic sda,
  output logic scl_s,
  output logic sda_s,
  output logic start,
  output logic stop,
  output logic scl_rise,
  output logic scl_fall
);

  logic scl_m, sda_m;   // first synchroniser stage
  logic scl_p, sda_p;   // previous synchronised value

  always_ff @(posedge clk) begin
    if (rst) begin
      {scl_m, scl_s, scl_p} <= '1;
      {sda_m, sda_s, sda_p} <= '1;
    end else begin
      scl_m <= scl;  scl_s <= scl_m;  scl_p <= scl_s;
      sda_m <= sda;  sda_s <= sda_m;  sda_p <= sda_s;
    end
  end

  assign scl_rise = scl_s & ~scl_p;
  assign scl_fall = ~scl_s & scl_p;
  assign start    = scl_s & scl_p & sda_p & ~sda_s;
  assign stop     = scl_s & scl_p & ~sda_p & sda_s;

endmodule
