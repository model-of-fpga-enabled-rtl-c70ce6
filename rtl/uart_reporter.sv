// Sends a rate to the PC as a line of text over the UART.
//
// A pulse on send (while not busy) captures value and transmits it as five
// ASCII decimal digits, most significant first with leading zeros, followed by
// carriage return and line feed, so a terminal program shows one reading per
// line ("00084\r\n"). The digits come from the bin2bcd converter and each
// character goes through uart_tx; the message takes 7 frames, 70*BAUD_DIV + 7
// cycles (one hand-over cycle per character). Forwarding the received data to
// the PC at 9600 baud follows the original system; the text format is this
// design's choice.
module uart_reporter #(
  parameter int unsigned BAUD_DIV = bodymon_pkg::BAUD_DIV,
  parameter int unsigned VAL_W    = bodymon_pkg::RATE_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [VAL_W-1:0] value,
  input  logic             send,
  output logic             busy,
  output logic             txd
);

  localparam int unsigned NDIG = 5;
  localparam int unsigned NCHR = NDIG + 2;

  logic [VAL_W-1:0]  held;
  logic [4*NDIG-1:0] bcd;
  logic [2:0]        idx;        // next character to hand to uart_tx
  logic [7:0]        chr;
  logic              tx_ready, tx_valid;

  bin2bcd #(.IN_W(VAL_W), .DIGITS(NDIG)) u_bcd (.bin(held), .bcd(bcd));

  always_comb begin
    if (idx < 3'(NDIG)) chr = 8'h30 + 8'(bcd[4*(3'(NDIG-1)-idx) +: 4]);
    else if (idx == 3'(NDIG)) chr = 8'h0D;
    else chr = 8'h0A;
  end

  assign tx_valid = busy && tx_ready && (idx < 3'(NCHR));

  uart_tx #(.BAUD_DIV(BAUD_DIV)) u_tx (
    .clk, .rst, .data(chr), .valid(tx_valid), .ready(tx_ready), .txd
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      held <= '0;
      idx  <= '0;
    end else if (!busy) begin
      if (send) begin
        busy <= 1'b1;
        held <= value;
        idx  <= '0;
      end
    end else if (tx_valid) begin
      idx <= idx + 3'd1;
    end else if (idx == 3'(NCHR) && tx_ready) begin
      busy <= 1'b0;
    end
  end

endmodule
