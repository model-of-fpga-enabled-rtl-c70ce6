// Multiplexed seven-segment display of a decimal value.
//
// The binary value is converted to DIGITS decimal digits (leading zeros shown,
// as in "0084"). A refresh counter enables one digit at a time, each for
// REFRESH_CYCLES cycles (1 ms at 50 MHz), fast enough that all digits appear
// lit. Segments and anodes are active low, as on common-anode board displays;
// seg[0] is segment a and seg[6] segment g. Showing the rate on the display is
// the original system's; the multiplexing, polarity and refresh rate are this design's
// choices. The outputs are registered and change one cycle after the digit
// counter steps.
module seven_seg #(
  parameter int unsigned DIGITS         = 4,
  parameter int unsigned REFRESH_CYCLES = 50_000,
  parameter int unsigned VAL_W          = bodymon_pkg::RATE_W
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [VAL_W-1:0]   value,
  output logic [6:0]         seg,
  output logic [DIGITS-1:0]  an
);

  localparam int unsigned RW = bodymon_pkg::cnt_w(REFRESH_CYCLES);
  localparam int unsigned SW = bodymon_pkg::cnt_w(DIGITS);

  logic [4*DIGITS-1:0] bcd;
  logic [RW-1:0]       refresh;
  logic [SW-1:0]       sel;
  logic [3:0]          digit;
  logic [6:0]          pattern;   // active high, bit 0 = a

  bin2bcd #(.IN_W(VAL_W), .DIGITS(DIGITS)) u_bcd (.bin(value), .bcd(bcd));

  always_ff @(posedge clk) begin
    if (rst) begin
      refresh <= '0;
      sel     <= '0;
    end else if (refresh == RW'(REFRESH_CYCLES - 1)) begin
      refresh <= '0;
      sel     <= (sel == SW'(DIGITS - 1)) ? '0 : sel + 1'b1;
    end else begin
      refresh <= refresh + 1'b1;
    end
  end

  assign digit = bcd[4*sel +: 4];

  always_comb begin
    unique case (digit)
      4'd0: pattern = 7'b0111111;
      4'd1: pattern = 7'b0000110;
      4'd2: pattern = 7'b1011011;
      4'd3: pattern = 7'b1001111;
      4'd4: pattern = 7'b1100110;
      4'd5: pattern = 7'b1101101;
      4'd6: pattern = 7'b1111101;
      4'd7: pattern = 7'b0000111;
      4'd8: pattern = 7'b1111111;
      4'd9: pattern = 7'b1101111;
      default: pattern = 7'b0000000;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      seg <= '1;
      an  <= '1;
    end else begin
      seg <= ~pattern;
      an  <= ~(DIGITS'(1) << sel);
    end
  end

endmodule
