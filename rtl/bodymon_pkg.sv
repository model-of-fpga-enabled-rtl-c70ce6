// Shared constants of the pulse-rate monitor.
//
// The patient end counts heart pulses for a fixed window, converts the count to
// beats per minute and sends it over I2C to the clinical end, which stores it,
// shows it and forwards it to a PC over a UART. The numbers below are the
// system's nominal settings: a 50 MHz clock, an 8 s counting window, a control
// instant 0.1 s (5,000,000 cycles) into each window, a critical rate of 80 bpm,
// a 2.5 Hz buzzer tone, a 100 kHz I2C clock, 9600 baud and the slave address
// 1001001. The per-cycle counts are derived from them; modules take them as
// parameter defaults, so a test can shorten every interval.
package bodymon_pkg;

  localparam int unsigned CLK_HZ         = 50_000_000;
  localparam int unsigned SAMPLE_SECONDS = 8;
  localparam int unsigned WINDOW_CYCLES  = CLK_HZ * SAMPLE_SECONDS;   // 400,000,000
  localparam int unsigned CTRL_CYCLES    = 5_000_000;                  // 0.1 s
  localparam int unsigned CRITICAL_BPM   = 80;
  // 2.5 Hz square wave: half a period is CLK_HZ / 5 cycles
  localparam int unsigned BUZZ_HALF_CYCLES = CLK_HZ / 5;              // 10,000,000
  localparam int unsigned I2C_HZ         = 100_000;
  localparam int unsigned I2C_QUARTER_CYCLES = CLK_HZ / (4 * I2C_HZ);  // 125
  localparam int unsigned BAUD           = 9600;
  localparam int unsigned BAUD_DIV       = CLK_HZ / BAUD;              // 5208
  localparam logic [6:0]  SLAVE_ADDR     = 7'b1001001;
  localparam int unsigned RATE_W         = 16;                         // two I2C data bytes
  localparam int unsigned NBYTES         = RATE_W / 8;

  // Width of a counter that must hold values 0 .. n-1 (at least 1 bit)
  function automatic int unsigned cnt_w(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
