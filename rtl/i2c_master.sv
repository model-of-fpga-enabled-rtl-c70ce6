// I2C master with a 7-bit address, for writes and reads of NBYTES bytes.
//
// A pulse on start (while idle) runs one transfer: START, the 7-bit
// SLAVE_ADDR with the direction bit rw (0 = write, 1 = read), an acknowledge
// bit from the slave, then NBYTES bytes, most significant byte and bit first,
// and STOP. In a write the master sends data and the slave acknowledges each
// byte. In a read the slave sends the bytes; the master acknowledges every one
// but the last, which it leaves unacknowledged, and then places them in rdata.
// The master generates SCL. Every bit lasts four quarter periods of
// QUARTER_CYCLES clock cycles (125 gives 100 kHz from 50 MHz):
//   q0  SCL pulled low, SDA unchanged
//   q1  SDA set to the bit (released when the other side sends)
//   q2  SCL released high; SDA is sampled at the end of q2
//   q3  SCL still high
// START holds SDA low for a whole bit time with SCL high before the first q0;
// STOP pulls SDA low in q1 and releases it in q3 while SCL is high. If the
// slave's acknowledge bit reads high, the master skips the rest, sends STOP and
// sets nack (cleared by the next start). Both lines are open drain:
// scl_oe/sda_oe high means "pull the line low"; sda_in is the SDA bus level.
// The master is the only device that drives SCL, so it does not read SCL back.
// A transfer lasts 2 + 9*(NBYTES+1) bit times (START, address byte, data
// bytes, their acknowledge bits, STOP): 29 bits or 116 quarters for two bytes,
// 290 us at 100 kHz. done pulses for one cycle right after STOP.
// The frame (address 1001001, direction bit, acknowledged bytes, STOP) follows
// the original system, which only writes; the quarter-period timing, the NACK
// handling and the read sequence are this design's.
module i2c_master #(
  parameter int unsigned QUARTER_CYCLES = bodymon_pkg::I2C_QUARTER_CYCLES,
  parameter logic [6:0]  ADDR           = bodymon_pkg::SLAVE_ADDR,
  parameter int unsigned NBYTES         = bodymon_pkg::NBYTES
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic                rw,
  input  logic [8*NBYTES-1:0] data,
  input  logic                sda_in,
  output logic                scl_oe,
  output logic                sda_oe,
  output logic                busy,
  output logic                done,
  output logic                nack,
  output logic [8*NBYTES-1:0] rdata
);

  typedef enum logic [3:0] {
    M_IDLE, M_START, M_ADDR, M_ADDR_ACK, M_DATA, M_DATA_ACK, M_RDATA, M_RACK, M_STOP
  } mstate_t;

  localparam int unsigned QW = bodymon_pkg::cnt_w(QUARTER_CYCLES);
  localparam int unsigned BW = bodymon_pkg::cnt_w(NBYTES);

  mstate_t             state;
  logic [1:0]          phase;
  logic [QW-1:0]       qcnt;
  logic                tick;
  logic [2:0]          bitn;
  logic [BW-1:0]       byte_idx;
  logic [7:0]          sh;
  logic [8*NBYTES-1:0] payload;
  logic                reading;
  logic                ack_ok;
  logic                last_byte;

  assign tick      = (qcnt == QW'(QUARTER_CYCLES - 1));
  assign busy      = (state != M_IDLE);
  assign last_byte = (byte_idx == BW'(NBYTES - 1));

  // SDA level driven in q1 of the current bit (1 = pull low)
  function automatic logic drive_low(mstate_t s, logic msb, logic last);
    case (s)
      M_ADDR, M_DATA:  return ~msb;
      M_START, M_STOP: return 1'b1;
      M_RACK:          return ~last;  // acknowledge all read bytes but the last
      default:         return 1'b0;   // slave drives: release SDA
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= M_IDLE;
      phase    <= '0;
      qcnt     <= '0;
      bitn     <= '0;
      byte_idx <= '0;
      sh       <= '0;
      payload  <= '0;
      reading  <= 1'b0;
      ack_ok   <= 1'b0;
      scl_oe   <= 1'b0;
      sda_oe   <= 1'b0;
      done     <= 1'b0;
      nack     <= 1'b0;
      rdata    <= '0;
    end else begin
      done <= 1'b0;
      if (state == M_IDLE) begin
        qcnt <= '0;
        if (start) begin
          state   <= M_START;
          phase   <= 2'd0;
          payload <= data;
          reading <= rw;
          sh      <= {ADDR, rw};
          bitn    <= '0;
          nack    <= 1'b0;
          sda_oe  <= 1'b1;          // SDA falls while SCL is high: START
          scl_oe  <= 1'b0;
        end
      end else if (!tick) begin
        qcnt <= qcnt + 1'b1;
      end else begin
        qcnt  <= '0;
        phase <= phase + 2'd1;
        unique case (phase)
          2'd0: sda_oe <= drive_low(state, sh[7], last_byte);  // entering q1
          2'd1: if (state != M_START) scl_oe <= 1'b0;           // entering q2
          2'd2: begin                                            // entering q3
            ack_ok <= ~sda_in;
            if (state == M_RDATA) sh <= {sh[6:0], sda_in};
            if (state == M_STOP) sda_oe <= 1'b0;  // SDA rises, SCL high: STOP
          end
          2'd3: begin                                            // end of the bit
            scl_oe <= 1'b1;
            unique case (state)
              M_START: state <= M_ADDR;
              M_ADDR, M_DATA, M_RDATA: begin
                if (state != M_RDATA) sh <= {sh[6:0], 1'b0};
                if (bitn == 3'd7) begin
                  bitn <= '0;
                  unique case (state)
                    M_ADDR:  state <= M_ADDR_ACK;
                    M_DATA:  state <= M_DATA_ACK;
                    default: begin
                      state <= M_RACK;
                      rdata <= (rdata << 8) | (8*NBYTES)'(sh);
                    end
                  endcase
                end else begin
                  bitn <= bitn + 3'd1;
                end
              end
              M_ADDR_ACK, M_DATA_ACK: begin
                if (!ack_ok) begin
                  nack  <= 1'b1;
                  state <= M_STOP;
                end else if (state == M_DATA_ACK && last_byte) begin
                  state <= M_STOP;
                end else begin
                  if (state == M_DATA_ACK) byte_idx <= byte_idx + 1'b1;
                  else                     byte_idx <= '0;
                  sh      <= payload[8*NBYTES-1 -: 8];
                  payload <= payload << 8;
                  state   <= reading ? M_RDATA : M_DATA;
                end
              end
              M_RACK: begin
                if (last_byte) begin
                  state <= M_STOP;
                end else begin
                  byte_idx <= byte_idx + 1'b1;
                  state    <= M_RDATA;
                end
              end
              M_STOP: begin
                scl_oe   <= 1'b0;
                state    <= M_IDLE;
                byte_idx <= '0;
                done     <= 1'b1;
              end
              default: state <= M_IDLE;
            endcase
          end
        endcase
      end
    end
  end

  // Protocol rules: the idle master leaves both lines released, and SDA only
  // changes while SCL is high at START (falling) and STOP (rising).
  a_idle_released: assert property (@(posedge clk) disable iff (rst)
    (state == M_IDLE && !start) |=> (state != M_IDLE || (!scl_oe && !sda_oe)));
  a_sda_stable_high: assert property (@(posedge clk) disable iff (rst)
    (!scl_oe && $past(!scl_oe) && sda_oe != $past(sda_oe)) |->
      ((state == M_START && sda_oe) || (state == M_STOP && !sda_oe) || $past(state) == M_IDLE));

endmodule
