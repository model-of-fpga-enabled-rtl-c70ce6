// Self-checking test of seven_seg.
//
// For a list of values the test watches every digit slot: exactly one anode is
// low at a time, the slots are visited in turn, each for REFRESH cycles, and
// the segment pattern in each slot decodes to the expected decimal digit
// (leading zeros included). The expected digits come from integer division.
module tb_seven_seg;
  localparam int unsigned DIG = 4, REFRESH = 6;
  logic clk = 1'b0, rst = 1'b1;
  logic [15:0] value = '0;
  logic [6:0] seg;
  logic [DIG-1:0] an;
  int checks = 0, failures = 0;

  seven_seg #(.DIGITS(DIG), .REFRESH_CYCLES(REFRESH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int decode(input logic [6:0] s);
    // active-low patterns a..g in bits 0..6
    case (~s)
      7'b0111111: return 0;  7'b0000110: return 1;  7'b1011011: return 2;
      7'b1001111: return 3;  7'b1100110: return 4;  7'b1101101: return 5;
      7'b1111101: return 6;  7'b0000111: return 7;  7'b1111111: return 8;
      7'b1101111: return 9;  default: return -1;
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int vals [6] = '{84, 0, 1234, 9999, 7, 4056};
  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    foreach (vals[k]) begin
      int seen [DIG];
      int slot_len;
      value <= 16'(vals[k]);
      repeat (2 * DIG * REFRESH + 3) @(posedge clk);   // settle
      foreach (seen[d]) seen[d] = 0;
      slot_len = 0;
      for (int i = 0; i < 2 * DIG * REFRESH; i++) begin
        @(posedge clk);
        check($countones(~an) == 1, "one digit on");
        for (int d = 0; d < DIG; d++) if (!an[d]) begin
          int want;
          want = (vals[k] / (10 ** d)) % 10;
          seen[d]++;
          check(decode(seg) == want, $sformatf("value %0d digit %0d shows %0d want %0d", vals[k], d, decode(seg), want));
        end
      end
      foreach (seen[d]) check(seen[d] == 2 * REFRESH, $sformatf("digit %0d on %0d cycles", d, seen[d]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
