// Self-checking test of i2c_master against a behavioural slave.
//
// The bus is modelled as open-drain lines with pull-ups. A monitor, sampling
// the lines every clock, decodes START, STOP and the bits latched on rising
// SCL, and acknowledges like a slave would (pulling SDA low from the falling
// SCL edge after the eighth bit of a byte to the next falling edge). Three
// transfers are checked: a fully acknowledged one (frame, data, no nack, and
// the duration of 116 quarter periods), one whose address is not acknowledged
// and one whose first data byte is not acknowledged (both must end in STOP
// with nack set). For a read the model sends a 16-bit word bit by bit after
// each falling SCL edge; the master must acknowledge the first byte, leave the
// second unacknowledged, end with STOP and present the word on rdata. SDA
// must never change while SCL is high except as START or STOP.
module tb_i2c_master;
  localparam int unsigned Q = 4;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, rw = 1'b0;
  logic [15:0] data = '0, rdata;
  logic scl_oe, sda_oe, busy, done, nack;
  logic slave_pull = 1'b0;
  wire  scl = ~scl_oe;
  wire  sda = ~(sda_oe | slave_pull);
  int checks = 0, failures = 0;

  i2c_master #(.QUARTER_CYCLES(Q), .ADDR(7'b1001001), .NBYTES(2)) dut (
    .clk, .rst, .start, .rw, .data, .sda_in(sda), .scl_oe, .sda_oe, .busy, .done, .nack,
    .rdata
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- behavioural slave / monitor ----
  logic scl_q = 1'b1, sda_q = 1'b1;
  int   nbits = 0, nstarts = 0, nstops = 0, bad_edges = 0;
  logic [7:0] bytes_rx [4];
  int   nbytes_rx = 0;
  logic [7:0] cur;
  int   ack_mask = 32'hF;     // bit k: acknowledge byte k (0 = address)
  logic [15:0] rd_word = '0;  // word the model sends on a read
  logic rd_mode;
  logic mack [4];             // acknowledge the master gave after read byte k

  always @(posedge clk) begin
    scl_q <= scl;
    sda_q <= sda;
    if (scl && scl_q && sda != sda_q) begin
      if (!sda) begin nstarts++; nbits = 0; nbytes_rx = 0; end
      else nstops++;
    end
    if (scl && !scl_q) begin                     // rising SCL: a bit
      if (nbits % 9 != 8) cur = {cur[6:0], sda};
      else if (nbytes_rx <= 4) ;                 // acknowledge bit
      nbits++;
      if (nbits % 9 == 8 && nbytes_rx < 4) begin bytes_rx[nbytes_rx] = cur; nbytes_rx++; end
    end
    if (scl && !scl_q && nbits % 9 == 0 && nbits > 9 && rd_mode)
      mack[nbits / 9 - 1] = ~sda;                // master acknowledge bit just sampled
    if (!scl && scl_q) begin                     // falling SCL: the next bit begins
      int b, pos;
      logic pull;
      b = nbits; pos = b % 9; pull = 1'b0;
      if (pos == 8 && ack_mask[b / 9] && (b / 9 == 0 || !rd_mode)) pull = 1'b1;
      else if (rd_mode && b >= 9 && b < 27 && pos < 8) pull = ~rd_word[(2 - b / 9) * 8 + 7 - pos];
      slave_pull <= pull;
    end
  end

  // read mode: the address byte asked for a read
  assign rd_mode = (nbytes_rx >= 1) && bytes_rx[0][0];

  task automatic transfer(input logic [15:0] d, input int mask, output int cycles,
                          input logic r = 1'b0);
    ack_mask = mask;
    nstarts = 0; nstops = 0;
    foreach (mack[k]) mack[k] = 1'bx;
    data <= d;
    rw   <= r;
    @(posedge clk) start <= 1'b1;
    @(posedge clk) start <= 1'b0;
    cycles = 1;
    while (!done) begin @(posedge clk); cycles++; end
    repeat (Q * 8) @(posedge clk);
  endtask

  int cyc;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (5) @(posedge clk);
    check(scl && sda, "bus idle after reset");

    transfer(16'b1010101111001101, 32'hF, cyc);
    check(nstarts == 1 && nstops == 1, $sformatf("one START and one STOP, saw %0d %0d", nstarts, nstops));
    check(nbytes_rx == 3, $sformatf("3 bytes on the bus, saw %0d", nbytes_rx));
    check(bytes_rx[0] == 8'b10010010, $sformatf("address byte %b", bytes_rx[0]));
    check(bytes_rx[1] == 8'b10101011, $sformatf("first data byte %b", bytes_rx[1]));
    check(bytes_rx[2] == 8'b11001101, $sformatf("second data byte %b", bytes_rx[2]));
    check(nack == 1'b0, "no nack when acknowledged");
    check(cyc >= 116 * Q && cyc <= 116 * Q + 2, $sformatf("transfer took %0d cycles, expected %0d", cyc, 116 * Q));
    check(!busy && scl && sda, "bus released after transfer");

    transfer(16'h1234, 32'h0, cyc);
    check(nack == 1'b1, "nack when address not acknowledged");
    check(nbytes_rx == 1 && nstops == 1, "STOP right after address");

    transfer(16'h00FF, 32'h1, cyc);
    check(nack == 1'b1, "nack when data not acknowledged");
    check(nbytes_rx == 2 && nstops == 1, "STOP right after first data byte");
    check(bytes_rx[1] == 8'h00, "first data byte sent");

    transfer(16'h0054, 32'hF, cyc);
    check(nack == 1'b0 && nbytes_rx == 3 && bytes_rx[2] == 8'h54, "rate 84 sent, nack cleared");

    rd_word = 16'h5AC3;
    transfer(16'h0000, 32'hF, cyc, 1'b1);
    check(bytes_rx[0] == 8'b10010011, $sformatf("read address byte %b", bytes_rx[0]));
    check(nstarts == 1 && nstops == 1, $sformatf("read: one START and one STOP, saw %0d %0d", nstarts, nstops));
    check(nbytes_rx == 3 && bytes_rx[1] == 8'h5A && bytes_rx[2] == 8'hC3, "read: slave bytes on the bus");
    check(rdata == 16'h5AC3, $sformatf("read: rdata %h, expected 5ac3", rdata));
    check(mack[1] === 1'b1, "read: master acknowledges the first byte");
    check(mack[2] === 1'b0, "read: master does not acknowledge the last byte");
    check(nack == 1'b0, "read: no nack");
    check(cyc >= 116 * Q && cyc <= 116 * Q + 2, $sformatf("read took %0d cycles, expected %0d", cyc, 116 * Q));
    check(!busy && scl && sda, "bus released after read");

    rd_word = 16'hFFFF;
    transfer(16'h0000, 32'hF, cyc, 1'b1);
    check(rdata == 16'hFFFF, "read of all ones");
    transfer(16'h0000, 32'h0, cyc, 1'b1);
    check(nack == 1'b1 && nbytes_rx == 1 && nstops == 1, "read address not acknowledged: nack and STOP");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
