// Self-checking test of pulse_counter with a short window.
//
// For several windows the test sends a known number of sensor pulses (random
// spacing, each at least two cycles wide), then checks that the window ends
// exactly WIN cycles after the previous one, that bpm becomes
// pulses * 60 / 8 and that bpm_valid pulses once. A watchdog ends the run if
// the windows stop.
module tb_pulse_counter;
  localparam int unsigned WIN = 800;
  logic clk = 1'b0, rst = 1'b1, pulse_in = 1'b0;
  logic [31:0] clk_count;
  logic window_done, bpm_valid;
  logic [15:0] bpm;
  int checks = 0, failures = 0;
  int unsigned cycle = 0;

  pulse_counter #(.WINDOW_CYCLES(WIN), .SAMPLE_SECONDS(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int npulses [6] = '{0, 11, 12, 20, 3, 60};
  int unsigned last_done;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // window 0 starts on the cycle after reset
    for (int w = 0; w < 6; w++) begin
      fork
        begin
          // pulses spread over the window, leaving margin at its end
          for (int p = 0; p < npulses[w]; p++) begin
            repeat (2 + $urandom_range(0, 6)) @(posedge clk);
            pulse_in <= 1'b1;
            repeat (2 + $urandom_range(0, 2)) @(posedge clk);
            pulse_in <= 1'b0;
          end
        end
        begin
          @(posedge clk iff window_done);
          if (w > 0) check(cycle - last_done == WIN, $sformatf("window %0d length %0d", w, cycle - last_done));
          last_done = cycle;
          @(posedge clk);
          check(bpm_valid == 1'b1, "bpm_valid after window");
          check(bpm == 16'(npulses[w] * 60 / 8),
                $sformatf("window %0d: bpm %0d expected %0d", w, bpm, npulses[w] * 60 / 8));
          @(posedge clk);
          check(bpm_valid == 1'b0, "bpm_valid is one cycle");
          check(clk_count == 32'd1, "clock counter restarted");
        end
      join
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
