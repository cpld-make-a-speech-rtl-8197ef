// tb_i2c_slave_rx: drives the two bus wires directly from a task (no bus
// master involved) with random timing, and checks one receiving station.
// Frames to its own address and to the broadcast address must deliver the
// byte; frames to another address, read frames, frames cut short by a STOP
// and frames broken off by a new START must deliver nothing, and the station
// must still take the next good frame. The delay from the falling scl edge
// that ends the last data bit to data_valid must be 3 to 5 clocks.
module tb_i2c_slave_rx;
  import speech_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic scl = 1'b1, sda = 1'b1;
  logic [7:0] data;
  logic data_valid;
  int checks = 0, failures = 0;
  int valids = 0;
  int since_fall = 0;
  logic [7:0] last_byte;
  localparam logic [6:0] OWN = 7'h2A;

  always #5 clk = ~clk;

  i2c_slave_rx #(.OWN_ADDR(OWN)) dut (.clk, .rst_n, .scl, .sda, .data, .data_valid);

  always @(posedge clk) begin
    if (rst_n && data_valid) begin
      valids++;
      last_byte = data;
    end
  end

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  int q;   // clocks per quarter bit, varied per frame

  task automatic wait_q();
    repeat (q) @(posedge clk);
  endtask

  task automatic bus_start();
    scl <= 1'b1; sda <= 1'b1; wait_q();
    sda <= 1'b0; wait_q(); wait_q();
    scl <= 1'b0; wait_q();
  endtask

  task automatic bus_bit(logic b);
    sda <= b; wait_q();
    scl <= 1'b1; wait_q(); wait_q();
    scl <= 1'b0; wait_q();
  endtask

  task automatic bus_stop();
    sda <= 1'b0; wait_q();
    scl <= 1'b1; wait_q();
    sda <= 1'b1; wait_q(); wait_q();
  endtask

  // Sends START, address, rw, ack slot, then nbits of data (MSB first), then
  // the second ack slot and STOP if the byte is complete.
  task automatic frame(logic [6:0] a, logic rw, logic [7:0] d, int nbits, bit stop);
    bus_start();
    for (int i = 6; i >= 0; i--) bus_bit(a[i]);
    bus_bit(rw);
    bus_bit(1'b1);
    for (int i = 7; i > 7 - nbits; i--) bus_bit(d[i]);
    if (nbits == 8) bus_bit(1'b1);
    if (stop) bus_stop();
  endtask

  task automatic expect_byte(string what, logic [7:0] d, int n0);
    checks++;
    if (valids != n0 + 1) fail($sformatf("%s: %0d bytes delivered, expected 1", what, valids - n0));
    checks++;
    if (last_byte !== d) fail($sformatf("%s: byte %h expected %h", what, last_byte, d));
    checks++;
    if (data !== d) fail($sformatf("%s: data not held", what));
  endtask

  task automatic expect_none(string what, int n0);
    checks++;
    if (valids != n0) fail($sformatf("%s: %0d bytes delivered, expected none", what, valids - n0));
  endtask

  // Latency from the falling scl edge after the last data bit to data_valid.
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && data_valid) begin
        checks++;
        if (since_fall < 3 || since_fall > 5) fail($sformatf("data_valid %0d clocks after scl fell", since_fall));
      end
    end
  end
  logic scl_d = 1'b1;
  always @(posedge clk) begin
    scl_d <= scl;
    if (!scl && scl_d) since_fall <= 1; else since_fall <= since_fall + 1;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0;
    logic [7:0] d;
    q = 4;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    for (int n = 0; n < 40; n++) begin
      q = $urandom_range(2, 6);
      d = 8'($urandom);
      n0 = valids;
      case (n % 6)
        0: begin frame(OWN, 1'b0, d, 8, 1); expect_byte("own address", d, n0); end
        1: begin frame(ADDR_BROADCAST, 1'b0, d, 8, 1); expect_byte("broadcast", d, n0); end
        2: begin frame(OWN ^ 7'(1 << $urandom_range(0, 6)), 1'b0, d, 8, 1); expect_none("other address", n0); end
        3: begin frame(OWN, 1'b1, d, 8, 1); expect_none("read frame", n0); end
        4: begin frame(OWN, 1'b0, d, $urandom_range(1, 7), 1); expect_none("cut by STOP", n0); end
        5: begin
          frame(OWN, 1'b0, ~d, $urandom_range(0, 7), 0);
          sda <= 1'b1; wait_q();
          frame(OWN, 1'b0, d, 8, 1);   // repeated START restarts reception
          expect_byte("after repeated START", d, n0);
        end
        default: ;
      endcase
      repeat ($urandom_range(0, 10)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
