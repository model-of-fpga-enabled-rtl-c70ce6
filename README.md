# Pulse-rate monitor over I2C: patient board to clinical board

This design is a two-board heart-rate monitor. A **patient-end** FPGA counts
the pulses from an optical pulse sensor for 8 seconds, works out beats per
minute, shows the rate on its seven-segment display and sounds a buzzer when
the rate is above 80 bpm. It then sends the rate as an **I2C master** over a
two-wire bus (SCL, SDA) to a **clinical-end** FPGA. That board is an **I2C
slave** at the fixed address `1001001`. It stores the rate, shows it on its own
display and sends it as a line of text to a PC over a 9600-baud UART (on the
board this goes through a USB-UART bridge chip). A third wire, the *control
signal*, runs from the patient board to the clinical board and tells it when
readings are valid.

All of it is synthesizable SystemVerilog. `body_monitor_top` holds both boards
and the bus between them, so the whole system can be simulated in one run.

```
 patient_end (I2C master)                         clinical_end (I2C slave)
 ---------------------------------                ------------------------------------
 pulse_in -> pulse_counter -> bpm                 i2c_slave (line receiver with
               |              |-> seven_seg (4)     START/STOP detection, address
               |              |-> alarm_buzzer      comparator, ACK, data receive)
               |              |     -> buzzer          |
               |              '-> i2c_master ==SCL==>  v
               v                            <=SDA=>  rate register -> seven_seg (8)
            ctrl_gen --ctrl_pulse--> (start)              |
               '-----ctrl_level---------- ctrl ---> gate  '-> uart_reporter -> uart_txd -> PC
```

## One reading, from sensor to PC

With the default settings (50 MHz clocks on both boards):

| time from reset | event |
|---|---|
| 0 .. 8 s | `pulse_counter` counts sensor rising edges. Its clock counter runs from 0 to 399,999,999. |
| 8 s (cycle 400,000,000) | The window ends. `bpm = pulses * 60 / 8` (truncated) goes into the rate register. Both counters restart. The display and the alarm follow the new rate. |
| 8.1 s (cycle 5,000,000 of window 2) | Control instant. The control wire goes high and stays high. If the rate is above 80, `i2c_master` starts a write. |
| + 290 us | The write ends: START, `1001001`+W, ACK, rate[15:8], ACK, rate[7:0], ACK, STOP. On STOP the slave hands over both bytes. |
| + 7.3 ms | The clinical end has stored the rate, displays it, and has sent `"00090\r\n"` (for 90 bpm) to the PC. |
| every 8 s after that | A new rate, a new control instant and, if above 80, a new write. |

No control instant falls in the first window, because no rate has been
measured yet. The control-instant rule covers every window from the second one
on.

**When a write is sent.** By default (`SEND_ONLY_ALARM = 1`), a rate goes over
the bus only while it is above the critical value. So the clinical end hears
about abnormal readings only, and keeps showing the last one. Set
`SEND_ONLY_ALARM = 0` to send every window's rate.

## The counting window and the rate

`pulse_counter` passes the sensor output through a two-flip-flop synchroniser
and counts its rising edges. There is no debouncing, so a sensor with a noisy
edge must be cleaned up outside. The window length, `WINDOW_CYCLES`, is
8 s x 50 MHz = 400,000,000 cycles. A 40,000,000-cycle count is sometimes given
for this window, but that would be 0.8 s at 50 MHz. The 8-second window is the
one used everywhere else, so it is the default.

The rate is `count * 60 / SAMPLE_SECONDS`, i.e. x7.5 for 8 s, truncated. The
resolution is therefore 7.5 bpm steps rounded down: 11 pulses give 82 bpm and
12 give 90. A reading such as 84 bpm cannot come from this formula. If your
board shows other values, check how its original count was rounded. The pulse
counter and the rate saturate at 65535.

## The I2C link

Both lines are open drain. Each device has an `*_oe` output that means "pull
this line low". The top forms `scl = !master_oe` and
`sda = !(master_oe | slave_oe)`. On real boards these become tri-state pins
with pull-up resistors. This is the wired-AND bus of the protocol.

### Master bit timing (`i2c_master`)

Every bit lasts four quarter periods of `I2C_QUARTER_CYCLES` = 125 cycles,
which is 100 kHz at 50 MHz:

```
        |  q0   |  q1   |  q2   |  q3   | q0 (next bit)
SCL  ‾‾‾\_______________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_______
SDA  ==== previous =====X======== bit ==========X====
                                ^ sampled here (end of q2)
```

- SDA changes one quarter after SCL falls. It never changes while SCL is high,
  except for START and STOP, so a receiver in another clock domain cannot
  mistake a data edge for either. Two assertions in the module check this.
- **START**: SDA goes low while SCL is high and stays low for one bit time,
  then SCL falls.
- **STOP**: SDA is pulled low in q1, SCL is released in q2, and SDA is released
  in q3 while SCL is high.
- A frame is 29 bit times (116 quarters, 14,500 cycles, 290 us) for the
  address and two data bytes. `done` pulses once at the end.
- If an ACK bit reads high, the master skips the rest, sends STOP and sets
  `nack`. The next start clears it.
- **Reads**: with `rw = 1` the address byte ends in 1 and the master releases
  SDA for the data bytes, sampling them at the end of q2. It acknowledges
  every byte but the last, leaves the last unacknowledged, sends STOP and puts
  the bytes on `rdata`. A read takes the same 29 bit times. The patient end
  only writes (`rw` is tied to 0); reads let another master fetch the stored
  rate from the clinical end.
- SCL is driven by the master alone, so there is no clock stretching and no
  arbitration.

### Slave receiver (`i2c_slave`, `i2c_start_stop_det`)

- **Line receiver** (`i2c_start_stop_det`): synchronises SCL and SDA with two
  flip-flops. It reports SCL rising and falling edges, START (SDA falls while
  SCL stays high) and STOP (SDA rises while SCL stays high), three local cycles
  after the bus edge.
- **Address comparator**: after START, the slave shifts in 8 bits on rising
  SCL. It compares the first seven with `SLAVE_ADDR`; the eighth is the R/W
  bit. On a match, `addr_match` (the enable of the slave) goes high.
- **ACK block**: on a match, the slave pulls SDA low from the next SCL falling
  edge to the one after it. It does the same after each of the first `NBYTES`
  data bytes. A further byte gets no ACK.
- **Data receive block**: bytes are shifted in MSB first. On STOP, and only if
  exactly `NBYTES` (2) bytes arrived, `data` is updated and `data_valid`
  pulses. A repeated START at any point restarts address reception.
- **Read answer**: for R/W = 1 the slave captures `rd_data` at the address
  and, after its ACK, puts one bit on SDA after each SCL falling edge, MSB
  first. After each byte it releases SDA and samples the master's
  acknowledge. An ACK asks for the next byte. A NACK, or the end of the
  `NBYTES` bytes, makes the slave release SDA until the next START. The
  clinical end answers a read with its stored rate.

The slave must sample the bus fast enough to see each quarter period. Its
synchroniser delay of about 3 local cycles must stay well below one quarter
(125 master cycles by default). The testbenches use quarters of 4 to 6 cycles.

## Control signal, alarm, displays, UART

- **`ctrl_gen`**: `ctrl_pulse` is high for one cycle when the clock counter
  equals `CTRL_CYCLES` (5,000,000, i.e. 0.1 s), in every window after the
  first. It starts the master. `ctrl_level` is the wire to the clinical board:
  it rises at the first control instant and stays high until reset.
- **Clinical end gating**: the clinical end synchronises the control wire. It
  accepts a received rate only while the wire is high, and only when it is not
  still sending the previous report. Otherwise the rate is dropped.
- **`alarm_buzzer`**: `alarm = rate > CRITICAL_BPM` (80). While the alarm is
  on, a divider toggles a tone every `BUZZ_HALF_CYCLES` (10,000,000 cycles,
  2.5 Hz). The buzzer is driven during the tone's high half. The tone restarts
  high at each alarm.
- **`seven_seg`**: a combinational double-dabble converter (`bin2bcd`) turns
  the value into decimal digits, shown with leading zeros (`0084`). The
  display is multiplexed one digit at a time, `REFRESH_CYCLES` = 50,000 cycles
  (1 ms) per digit. Segments and anodes are active low, for the common-anode
  displays of Digilent-style boards. `seg[0]` is segment a and `seg[6]`
  segment g. The patient board uses 4 digits, the clinical board 8.
- **`uart_reporter` / `uart_tx`**: each stored rate goes out as five ASCII
  digits plus CR LF, in 8N1 frames at `BAUD_DIV` = 5208 cycles per bit
  (9600.6 baud). A report is 7 frames, about 7.3 ms.

## Parameters

The defaults are the system's nominal settings. They are collected in
`bodymon_pkg` and passed down from `body_monitor_top`.

| parameter | default | meaning |
|---|---|---|
| `WINDOW_CYCLES` | 400,000,000 | counting window (8 s at 50 MHz) |
| `SAMPLE_SECONDS` | 8 | window length used in the x60 scaling |
| `CTRL_CYCLES` | 5,000,000 | control instant within a window (0.1 s) |
| `CRITICAL_BPM` | 80 | alarm and send threshold (strictly above) |
| `BUZZ_HALF_CYCLES` | 10,000,000 | half period of the 2.5 Hz tone |
| `I2C_QUARTER_CYCLES` | 125 | quarter of an SCL period (100 kHz) |
| `BAUD_DIV` | 5208 | cycles per UART bit (9600 baud) |
| `SLAVE_ADDR` | 7'b1001001 | slave address |
| `REFRESH_CYCLES` | 50,000 | display time per digit |
| `SEND_ONLY_ALARM` | 1 | send only rates above the threshold |

The clinical board's clock is assumed to be 50 MHz too. For a different clock,
scale `BAUD_DIV` and `REFRESH_CYCLES`, which only affect the clinical end. The
rate travels as 16 bits (two I2C bytes, `bodymon_pkg::RATE_W`).

## What is not here

- **The pulse sensor, buzzer, USB-UART bridge chip and PC terminal** are
  outside the FPGA. Their signals are ports of the top (`pulse_in`, `buzzer`,
  `uart_txd`).
- **Pin constraints** for the boards are not included.
- **Repeated START from the master, 10-bit addressing, clock stretching and
  multi-master arbitration** are not implemented. The system uses one 7-bit
  address, one master and single transfers. The slave does accept a repeated
  START.
- **Who reports to the PC.** One summary of the original system has the
  master collect the results and pass them to the PC. Here the clinical end
  (the slave) does it, as the rest of the description and the board setup
  show. The slave's read answer leaves room for the other arrangement.
- **The UART receive direction and RTS/CTS flow control** are not
  implemented. Nothing is sent from the PC to the board.

## Files and simulation

`rtl/` has one module (or the package) per file. `tb/` has one self-checking
testbench per module. Each testbench prints
`TB_RESULT checks=N failures=M` and ends. Each also has a watchdog that
counts a failure if the run hangs.

| testbench | what it covers |
|---|---|
| `tb_pulse_counter` | window length, rate per window, restart |
| `tb_ctrl_gen` | no control pulse in window 1, one per later window, level |
| `tb_alarm_buzzer` | threshold (80 vs 81), tone half-period |
| `tb_seven_seg` | digit values and multiplexing |
| `tb_i2c_start_stop_det` | START, STOP and edge counts, latency |
| `tb_i2c_master` | frame, data, duration, NACK on address and on data, reads with ACK/NACK from the master |
| `tb_i2c_slave` | ACKs, hand-over, wrong address, short, long and restarted writes, reads (capture, NACK, past the end) |
| `tb_uart_tx`, `tb_uart_reporter` | frames, timing, text line |
| `tb_patient_end`, `tb_clinical_end` | each board on its own, with bus models; read-back of the stored rate |
| `tb_body_monitor_top` | both boards on unrelated clocks with short intervals; counts every mechanism (window end, alarm, tone, control, skipped send, transfer, ACKs, hand-over, report) |
| `tb_body_monitor_full` | the top at its default parameters: one complete 8.1 s reading, about 410 million cycles |

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_i2c_master \
    -y rtl -y tb +libext+.sv -Irtl rtl/bodymon_pkg.sv tb/tb_i2c_master.sv
./obj_dir/Vtb_i2c_master +verilator+rand+reset+2
```

Reset is synchronous and active high. Everything that is read is reset, so the
design behaves the same when its registers start at random values. The short
tests take seconds. The full-size run takes about 7 minutes, because it
simulates 8 seconds of real time at 50 MHz.

To change the design, look first at the parameters above. The frame format is
set by `NBYTES` and `SLAVE_ADDR`, on both master and slave. The report format is
in `uart_reporter`.
