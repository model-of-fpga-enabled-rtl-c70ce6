// Binary to decimal digits, combinational (double dabble).
//
// The input is shifted in MSB first; before each shift every 4-bit decimal
// digit that is 5 or more gets 3 added, so that the shift carries it into the
// next digit. bcd holds DIGITS digits, least significant in bits [3:0]; a
// value that needs more digits loses its upper ones. Purely combinational.
module bin2bcd #(
  parameter int unsigned IN_W   = 16,
  parameter int unsigned DIGITS = 5
) (
  input  logic [IN_W-1:0]     bin,
  output logic [4*DIGITS-1:0] bcd
);

  always_comb begin
    bcd = '0;
    for (int i = IN_W - 1; i >= 0; i--) begin
      for (int d = 0; d < DIGITS; d++) begin
        if (bcd[4*d +: 4] >= 4'd5) bcd[4*d +: 4] = bcd[4*d +: 4] + 4'd3;
      end
      bcd = {bcd[4*DIGITS-2:0], bin[i]};
    end
  end

endmodule
