// Self-checking test of i2c_slave driven by a behavioural I2C master.
//
// Tasks generate START, bytes (MSB first, reading the acknowledge bit) and
// STOP on open-drain lines, each quarter period Q clock cycles. Checked: a
// write to address 1001001 is acknowledged bit by bit and hands over both data
// bytes at STOP; a wrong address is not acknowledged and hands over nothing;
// a write with one byte, or with a third byte (not acknowledged), hands over
// nothing; a repeated START restarts reception. Reads: the slave acknowledges
// its address with R/W = 1 and sends rd_data as it was at the address, upper
// byte first; after a NACK, or past the last byte, it leaves SDA released;
// a read hands nothing over on the write side.
module tb_i2c_slave;
  localparam int unsigned Q = 6;
  logic clk = 1'b0, rst = 1'b1;
  logic m_scl = 1'b1, m_sda = 1'b1;    // master model, 0 = pull low
  logic sda_oe, addr_match, data_valid;
  logic [15:0] data, rd_data = 16'hC35A;
  wire  scl = m_scl;
  wire  sda = m_sda & ~sda_oe;
  int checks = 0, failures = 0, valids = 0;

  i2c_slave #(.ADDR(7'b1001001), .NBYTES(2)) dut (
    .clk, .rst, .scl_in(scl), .sda_in(sda), .sda_oe, .addr_match, .data, .data_valid,
    .rd_data
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (data_valid) valids++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic quarter(); repeat (Q) @(posedge clk); endtask

  task automatic bus_start();          // SCL high on entry (idle or after a bit)
    m_sda <= 1'b1; quarter();
    m_scl <= 1'b1; quarter();
    m_sda <= 1'b0; quarter();
    m_scl <= 1'b0; quarter();
  endtask

  task automatic bus_stop();
    m_sda <= 1'b0; quarter();
    m_scl <= 1'b1; quarter();
    m_sda <= 1'b1; quarter(); quarter();
  endtask

  task automatic send_bit(input logic b, output logic seen);
    m_sda <= b; quarter();
    m_scl <= 1'b1; quarter();
    seen = sda; quarter();
    m_scl <= 1'b0; quarter();
  endtask

  task automatic send_byte(input logic [7:0] b, output logic acked);
    logic s;
    for (int i = 7; i >= 0; i--) send_bit(b[i], s);
    send_bit(1'b1, s);                 // release SDA for the acknowledge
    acked = ~s;
  endtask

  task automatic recv_byte(input logic give_ack, output logic [7:0] b);
    logic s;
    for (int i = 7; i >= 0; i--) begin send_bit(1'b1, s); b[i] = s; end
    send_bit(~give_ack, s);            // master's acknowledge
  endtask

  logic ack;
  logic [7:0] rb;
  int v0;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (10) @(posedge clk);

    // good write of 84
    v0 = valids;
    bus_start();
    send_byte(8'b1001001_0, ack); check(ack, "address acknowledged");
    check(addr_match, "addr_match set after a matching address");
    send_byte(8'h00, ack); check(ack, "byte 1 acknowledged");
    send_byte(8'h54, ack); check(ack, "byte 2 acknowledged");
    bus_stop();
    repeat (4) @(posedge clk);
    check(valids == v0 + 1 && data == 16'h0054, $sformatf("data 0x%h handed over", data));
    check(!addr_match, "addr_match cleared at STOP");

    // pattern 0xABCD
    v0 = valids;
    bus_start();
    send_byte(8'b1001001_0, ack);
    send_byte(8'b10101011, ack);
    send_byte(8'b11001101, ack);
    bus_stop();
    repeat (4) @(posedge clk);
    check(valids == v0 + 1 && data == 16'b1010101111001101, "second write handed over");

    // wrong address
    v0 = valids;
    bus_start();
    send_byte(8'b1001000_0, ack); check(!ack, "wrong address not acknowledged");
    send_byte(8'h11, ack); check(!ack, "no acknowledge after wrong address");
    send_byte(8'h22, ack);
    bus_stop();
    repeat (4) @(posedge clk);
    check(valids == v0 && data == 16'b1010101111001101, "nothing handed over for wrong address");

    // read of two bytes; rd_data changes after the address has been taken
    v0 = valids;
    bus_start();
    send_byte(8'b1001001_1, ack); check(ack, "read request acknowledged");
    check(addr_match, "addr_match set for a read");
    rd_data = 16'h0F0F;
    recv_byte(1'b1, rb); check(rb == 8'hC3, $sformatf("read byte 1 0x%h, expected c3", rb));
    recv_byte(1'b0, rb); check(rb == 8'h5A, $sformatf("read byte 2 0x%h, expected 5a", rb));
    check(sda, "SDA released after the last read byte");
    bus_stop();
    repeat (4) @(posedge clk);
    check(valids == v0, "a read hands nothing over");
    check(!addr_match, "addr_match cleared after read");

    // read that acknowledges past the last byte, then NACK on the first byte
    bus_start();
    send_byte(8'b1001001_1, ack);
    recv_byte(1'b1, rb); check(rb == 8'h0F, "new rd_data taken at the next read");
    recv_byte(1'b1, rb);
    recv_byte(1'b0, rb); check(rb == 8'hFF, "nothing driven past the last byte");
    bus_stop();
    bus_start();
    send_byte(8'b1001001_1, ack);
    recv_byte(1'b0, rb);
    recv_byte(1'b0, rb); check(rb == 8'hFF, "nothing driven after a NACK");
    bus_stop();
    repeat (4) @(posedge clk);
    check(valids == v0, "reads hand nothing over");

    // one byte only
    v0 = valids;
    bus_start();
    send_byte(8'b1001001_0, ack);
    send_byte(8'h77, ack); check(ack, "single byte acknowledged");
    bus_stop();
    repeat (4) @(posedge clk);
    check(valids == v0, "short write dropped");

    // three bytes
    bus_start();
    send_byte(8'b1001001_0, ack);
    send_byte(8'h01, ack);
    send_byte(8'h02, ack);
    send_byte(8'h03, ack); check(!ack, "third byte not acknowledged");
    bus_stop();
    repeat (4) @(posedge clk);
    check(valids == v0, "long write dropped");

    // repeated START in the middle of a write
    bus_start();
    send_byte(8'b1001001_0, ack);
    send_byte(8'hAA, ack);
    bus_start();
    send_byte(8'b1001001_0, ack); check(ack, "address acknowledged after repeated START");
    send_byte(8'h12, ack);
    send_byte(8'h34, ack);
    bus_stop();
    repeat (4) @(posedge clk);
    check(valids == v0 + 1 && data == 16'h1234, $sformatf("write after repeated START gives 0x%h", data));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
