// UART transmitter, 8 data bits, no parity, one stop bit.
//
// When ready is high, a cycle with valid high hands over a byte. The line
// (idle high) then carries a start bit (low), the eight data bits least
// significant first and a stop bit (high), each BAUD_DIV clock cycles long
// (5208 cycles give 9600 baud from 50 MHz). ready returns high on the cycle
// after the stop bit ends, so one frame takes 10*BAUD_DIV cycles. The 9600 baud
// rate is the original system's; the 8N1 frame is the usual UART setting.
module uart_tx #(
  parameter int unsigned BAUD_DIV = bodymon_pkg::BAUD_DIV
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);

  localparam int unsigned DW = bodymon_pkg::cnt_w(BAUD_DIV);

  logic [DW-1:0] div;
  logic [3:0]    nbit;     // bits still to send, 0 when idle
  logic [8:0]    frame;    // data bits then stop bit, sent LSB first

  assign ready = (nbit == 4'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      div   <= '0;
      nbit  <= '0;
      frame <= '1;
      txd   <= 1'b1;
    end else if (ready) begin
      div <= '0;
      if (valid) begin
        txd   <= 1'b0;                 // start bit
        frame <= {1'b1, data};
        nbit  <= 4'd10;
      end
    end else if (div == DW'(BAUD_DIV - 1)) begin
      div   <= '0;
      nbit  <= nbit - 4'd1;
      txd   <= (nbit == 4'd1) ? 1'b1 : frame[0];
      frame <= {1'b1, frame[8:1]};
    end else begin
      div <= div + 1'b1;
    end
  end

  // A request is only taken while ready; the line is high whenever idle.
  a_idle_high: assert property (@(posedge clk) disable iff (rst) (ready && $past(ready) && !$past(valid)) |-> txd);

endmodule
