// Self-checking test of clinical_end driven by a behavioural I2C master.
//
// Writes of two-byte rates are sent to address 1001001. Checked: a write while
// the control wire is low is acknowledged but not stored; with the control
// wire high each write updates the rate register, the display's lowest digit
// and produces a UART line of five decimal digits plus CR LF, decoded by a
// reference receiver; a write to another address is ignored; a write arriving
// while the previous report is still being sent is dropped; a read from the
// address returns the stored rate, upper byte first.
module tb_clinical_end;
  localparam int unsigned Q = 5, DIV = 20;
  logic clk = 1'b0, rst = 1'b1, ctrl_in = 1'b0;
  logic m_scl = 1'b1, m_sda = 1'b1;
  logic sda_oe, txd, rate_valid, addr_match;
  logic [6:0] seg;
  logic [7:0] an;
  logic [15:0] rate;
  wire  scl = m_scl;
  wire  sda = m_sda & ~sda_oe;
  int checks = 0, failures = 0;
  byte rx [$];

  clinical_end #(.SLAVE_ADDR(7'b1001001), .BAUD_DIV(DIV), .REFRESH_CYCLES(3), .DIGITS(8)) dut (
    .clk, .rst, .scl_in(scl), .sda_in(sda), .ctrl_in, .sda_oe, .seg, .an, .txd,
    .rate, .rate_valid, .addr_match
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference UART receiver
  initial begin
    logic [7:0] b;
    @(negedge rst);
    forever begin
      @(posedge clk iff txd == 1'b0);
      repeat (DIV / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (DIV) @(posedge clk); b[i] = txd; end
      repeat (DIV) @(posedge clk);
      rx.push_back(b);
    end
  end

  task automatic quarter(); repeat (Q) @(posedge clk); endtask
  task automatic send_bit(input logic b, output logic seen);
    m_sda <= b; quarter(); m_scl <= 1'b1; quarter(); seen = sda; quarter(); m_scl <= 1'b0; quarter();
  endtask
  task automatic write(input logic [6:0] a, input logic [15:0] d, output int acks);
    logic [23:0] f; logic s;
    f = {a, 1'b0, d};
    acks = 0;
    m_sda <= 1'b0; quarter(); m_scl <= 1'b0; quarter();          // START
    for (int by = 0; by < 3; by++) begin
      for (int i = 23 - 8 * by; i > 15 - 8 * by; i--) send_bit(f[i], s);
      send_bit(1'b1, s);
      if (!s) acks++;
    end
    m_sda <= 1'b0; quarter(); m_scl <= 1'b1; quarter(); m_sda <= 1'b1; quarter(); quarter();  // STOP
  endtask

  task automatic read(output logic [15:0] d, output int acks);
    logic s;
    acks = 0;
    m_sda <= 1'b0; quarter(); m_scl <= 1'b0; quarter();          // START
    for (int i = 7; i >= 0; i--) send_bit((i == 0) ? 1'b1 : logic'(7'b1001001 >> (i - 1)), s);
    send_bit(1'b1, s);
    if (!s) acks++;
    for (int i = 15; i >= 0; i--) begin
      send_bit(1'b1, s); d[i] = s;
      if (i % 8 == 0) send_bit(i != 0 ? 1'b0 : 1'b1, s);  // ACK, then NACK at the end
    end
    m_sda <= 1'b0; quarter(); m_scl <= 1'b1; quarter(); m_sda <= 1'b1; quarter(); quarter();  // STOP
  endtask

  function automatic int digit0();
    case (~seg)
      7'b0111111: return 0; 7'b0000110: return 1; 7'b1011011: return 2; 7'b1001111: return 3;
      7'b1100110: return 4; 7'b1101101: return 5; 7'b1111101: return 6; 7'b0000111: return 7;
      7'b1111111: return 8; 7'b1101111: return 9; default: return -1;
    endcase
  endfunction

  task automatic expect_report(input int v);
    string want, got;
    repeat (75 * DIV + 20) @(posedge clk);
    want = $sformatf("%05d\r\n", v);
    got = "";
    foreach (rx[i]) got = {got, string'(rx[i])};
    check(got == want, $sformatf("UART line for %0d: '%s'", v, got));
    rx.delete();
  endtask

  initial begin
    int acks, d;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (10) @(posedge clk);

    write(7'b1001001, 16'd84, acks);
    repeat (10) @(posedge clk);
    check(acks == 3, "write acknowledged with control low");
    check(rate == 16'd0 && rx.size() == 0, "not stored while control low");

    ctrl_in <= 1'b1;
    for (int k = 0; k < 3; k++) begin
      int v;
      v = (k == 0) ? 84 : (k == 1) ? 120 : 65535;
      write(7'b1001001, 16'(v), acks);
      repeat (10) @(posedge clk);
      check(acks == 3, "write acknowledged");
      check(rate == 16'(v), $sformatf("rate %0d stored, expected %0d", rate, v));
      d = -1;
      for (int i = 0; i < 30; i++) begin @(posedge clk); if (!an[0]) d = digit0(); end
      check(d == v % 10, $sformatf("display digit 0 shows %0d", d));
      expect_report(v);
    end

    write(7'b0101010, 16'd99, acks);
    repeat (10) @(posedge clk);
    check(acks == 0 && rate == 16'd65535, "other address ignored");

    // two writes back to back: the second arrives while the report is sent
    write(7'b1001001, 16'd91, acks);
    write(7'b1001001, 16'd92, acks);
    repeat (10) @(posedge clk);
    check(rate == 16'd91, $sformatf("write during report dropped, rate %0d", rate));
    expect_report(91);

    begin
      logic [15:0] rb;
      read(rb, acks);
      repeat (10) @(posedge clk);
      check(acks == 1 && rb == 16'd91, $sformatf("read-back gives %0d", rb));
      check(rate == 16'd91 && rx.size() == 0, "a read changes nothing");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
