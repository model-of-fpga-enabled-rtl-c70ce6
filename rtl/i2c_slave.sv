// I2C slave with a hard-coded 7-bit address, for writes and reads.
//
// The line receiver (i2c_start_stop_det) synchronises SCL and SDA and reports
// START, STOP and SCL edges. After a START the slave shifts in eight bits on
// rising SCL edges: the address comparator checks the first seven against
// ADDR. On a match the ACK block pulls SDA low from the following SCL falling
// edge to the next one, and addr_match (the enable of the slave system) goes
// high; otherwise the slave lets the transfer pass and waits for the next
// START.
// Write (R/W = 0): the data receive block shifts in bytes the same way and
// acknowledges each of the first NBYTES; a further byte is not acknowledged.
// At STOP, if exactly NBYTES bytes arrived, they are copied to data (first
// byte in the upper bits) and data_valid pulses for one cycle.
// Read (R/W = 1): rd_data is captured when the address matches and sent MSB
// first, each bit put on SDA right after an SCL falling edge. After each byte
// the slave releases SDA and samples the master's acknowledge on the rising
// edge; an acknowledge asks for the next byte, a NACK (or the end of the
// NBYTES bytes) makes the slave release the bus until the next START.
// A START at any point restarts address reception.
// The functional blocks (start/stop detector, address comparator, ACK block,
// data receive block) follow the original system. Handing data on only at
// STOP, and the read direction, which the original system never uses, are
// this design's choices. SDA changes about three local cycles after the bus
// edge, so a quarter of the SCL period must be longer than that.
module i2c_slave
#(
  parameter logic [6:0]  ADDR   = bodymon_pkg::SLAVE_ADDR,
  parameter int unsigned NBYTES = bodymon_pkg::NBYTES
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                scl_in,
  input  logic                sda_in,
  output logic                sda_oe,
  output logic                addr_match,
  output logic [8*NBYTES-1:0] data,
  output logic                data_valid,
  input  logic [8*NBYTES-1:0] rd_data
);

  typedef enum logic [2:0] {
    S_IDLE, S_ADDR, S_ADDR_ACK, S_DATA, S_DATA_ACK, S_TX, S_TX_ACK
  } sstate_t;

  localparam int unsigned BW = bodymon_pkg::cnt_w(NBYTES + 1);

  logic scl_s, sda_s, start, stop, scl_rise, scl_fall;
  sstate_t             state;
  logic [3:0]          bitn;
  logic [7:0]          sh;
  logic [BW-1:0]       nbytes;
  logic [8*NBYTES-1:0] buffer;
  logic                reading;   // the matched request is a read
  logic                m_ack;     // acknowledge sampled from the master

  i2c_start_stop_det u_det (
    .clk, .rst, .scl(scl_in), .sda(sda_in),
    .scl_s, .sda_s, .start, .stop, .scl_rise, .scl_fall
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      bitn       <= '0;
      sh         <= '0;
      nbytes     <= '0;
      buffer     <= '0;
      data       <= '0;
      data_valid <= 1'b0;
      sda_oe     <= 1'b0;
      addr_match <= 1'b0;
      reading    <= 1'b0;
      m_ack      <= 1'b0;
    end else begin
      data_valid <= 1'b0;
      if (start) begin
        state      <= S_ADDR;
        bitn       <= '0;
        nbytes     <= '0;
        sda_oe     <= 1'b0;
        addr_match <= 1'b0;
        reading    <= 1'b0;
      end else if (stop) begin
        if (state == S_DATA && !reading && addr_match && nbytes == BW'(NBYTES)) begin
          data       <= buffer;
          data_valid <= 1'b1;
        end
        state      <= S_IDLE;
        sda_oe     <= 1'b0;
        addr_match <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_ADDR, S_DATA: begin
            if (scl_rise && bitn != 4'd8) begin
              sh   <= {sh[6:0], sda_s};
              bitn <= bitn + 4'd1;
            end else if (scl_fall && bitn == 4'd8) begin
              bitn <= '0;
              if (state == S_ADDR) begin
                // address comparator: 7 address bits, then R/W
                if (sh[7:1] == ADDR) begin
                  addr_match <= 1'b1;
                  reading    <= sh[0];
                  if (sh[0]) buffer <= rd_data;
                  sda_oe     <= 1'b1;
                  state      <= S_ADDR_ACK;
                end else begin
                  state <= S_IDLE;
                end
              end else if (nbytes != BW'(NBYTES)) begin
                buffer <= (buffer << 8) | (8*NBYTES)'(sh);
                nbytes <= nbytes + 1'b1;
                sda_oe <= 1'b1;
                state  <= S_DATA_ACK;
              end else begin
                state      <= S_IDLE;   // one byte too many: no acknowledge
                addr_match <= 1'b0;
              end
            end
          end
          S_ADDR_ACK, S_DATA_ACK: begin
            if (scl_fall) begin
              if (reading) begin
                // first bit of the first read byte
                sda_oe <= ~buffer[8*NBYTES-1];
                buffer <= buffer << 1;
                nbytes <= nbytes + 1'b1;
                state  <= S_TX;
              end else begin
                sda_oe <= 1'b0;
                state  <= S_DATA;
              end
            end
          end
          S_TX: begin
            if (scl_fall) begin
              if (bitn == 4'd7) begin
                bitn   <= '0;
                sda_oe <= 1'b0;           // the master acknowledges
                state  <= S_TX_ACK;
              end else begin
                bitn   <= bitn + 4'd1;
                sda_oe <= ~buffer[8*NBYTES-1];
                buffer <= buffer << 1;
              end
            end
          end
          S_TX_ACK: begin
            if (scl_rise) m_ack <= ~sda_s;
            if (scl_fall) begin
              if (m_ack && nbytes != BW'(NBYTES)) begin
                sda_oe <= ~buffer[8*NBYTES-1];
                buffer <= buffer << 1;
                nbytes <= nbytes + 1'b1;
                state  <= S_TX;
              end else begin
                state      <= S_IDLE;     // released until the next START
                addr_match <= 1'b0;
              end
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // The slave pulls SDA low only to acknowledge or to send a read bit.
  a_ack_only: assert property (@(posedge clk) disable iff (rst)
    sda_oe |-> (state == S_ADDR_ACK || state == S_DATA_ACK || state == S_TX));

endmodule
