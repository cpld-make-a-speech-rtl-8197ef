// tb_i2c_master_tx: sends random frames through the bus master and decodes
// the wires with an independent monitor. Checked per frame: 18 bits between
// START and STOP; the address, the write bit 0, the data byte and both
// acknowledge slots at 1; done comes exactly 80*QUARTER clocks after the
// clock edge that took send; ready is low for the whole frame; sda never
// changes while scl is high except for one START and one STOP per frame;
// the bus rests at scl = sda = 1 between frames.
module tb_i2c_master_tx;
  logic clk = 1'b0, rst_n = 1'b0;
  logic send = 1'b0;
  logic [6:0] dev_addr = '0;
  logic [7:0] data = '0;
  logic ready, done, scl, sda;
  logic frame_valid;
  logic [17:0] bits;
  int nbits, starts, stops;
  int checks = 0, failures = 0;
  localparam int Q = 5;

  always #5 clk = ~clk;

  i2c_master_tx dut (.clk, .rst_n, .send, .dev_addr, .data, .ready, .done, .scl, .sda);
  i2c_bus_monitor mon (.clk, .scl, .sda, .frame_valid, .bits, .nbits, .starts, .stops);

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (!(scl && sda && ready)) fail("bus not idle after reset");
    for (int n = 0; n < 60; n++) begin
      logic [6:0] a;
      logic [7:0] d;
      int cyc, s0, p0;
      a = 7'($urandom);
      d = (n == 0) ? 8'b0000_1111 : 8'($urandom);
      s0 = starts; p0 = stops;
      dev_addr <= a; data <= d; send <= 1'b1;
      @(posedge clk);
      send <= 1'b0; dev_addr <= ~a; data <= ~d;   // inputs are only read with send
      cyc = 0;
      do begin
        @(posedge clk); #1;
        cyc++;
        if (!done) begin
          checks++;
          if (ready) fail("ready during frame");
        end
      end while (!done && cyc < 10000);
      checks++;
      if (cyc != 80 * Q) fail($sformatf("frame took %0d clocks, expected %0d", cyc, 80 * Q));
      repeat (3) @(posedge clk); #1;
      checks++;
      if (nbits != 18) fail($sformatf("%0d bits in frame", nbits));
      checks++;
      if (bits[17:11] !== a) fail($sformatf("address %h expected %h", bits[17:11], a));
      checks++;
      if (bits[10] !== 1'b0) fail("not a write");
      checks++;
      if (bits[9] !== 1'b1 || bits[0] !== 1'b1) fail("acknowledge slots not released");
      checks++;
      if (bits[8:1] !== d) fail($sformatf("data %h expected %h", bits[8:1], d));
      checks++;
      if (starts != s0 + 1 || stops != p0 + 1) fail("not exactly one START and one STOP");
      checks++;
      if (!(scl && sda && ready)) fail("bus not idle between frames");
      repeat ($urandom_range(0, 20)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
