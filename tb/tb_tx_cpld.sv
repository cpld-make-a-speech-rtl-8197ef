// tb_tx_cpld: the transmitter chip with a behavioural ADC0809 (on its own,
// slower clock) and a passive bus monitor. The input voltage changes at
// random; every completed conversion's value is queued together with the
// E/D switch setting that was in force when the conversion started. Each
// decoded bus frame must carry the bit-reversed sample to the address that
// setting selects (receiver 1, receiver 2 or broadcast). The first sample,
// 11110000, must appear on the wire as 00001111. With the switch at 00 there
// must be neither conversions nor frames (after the sample already being
// converted is sent). The sample period must match the conversion time, the
// frame being sent while the next conversion runs.
module tb_tx_cpld;
  import speech_pkg::*;

  logic clk = 1'b0, adc_clk = 1'b0, rst_n = 1'b0;
  logic [1:0] ed_sw = 2'b00;
  logic [7:0] datain;
  logic eoc, ale, start, i2c_clk, i2c_data;
  logic [2:0] addr;
  logic [7:0] vin [8];
  int conversions;
  logic frame_valid;
  logic [17:0] bits;
  int nbits, starts, stops;
  int checks = 0, failures = 0;
  int frames = 0, frames_rx1 = 0, frames_rx2 = 0, frames_both = 0;

  localparam int Q = 5;
  localparam int ADC_DIV = 12;   // ADC clock period in units of the CPLD clock

  always #5 clk = ~clk;
  always #(5 * ADC_DIV) adc_clk = ~adc_clk;

  tx_cpld dut (.clk, .rst_n, .ed_sw, .datain, .eoc, .ale, .start, .addr,
               .i2c_clk, .i2c_data);
  adc0809_model adc (.adc_clk, .ale, .start, .addr, .vin, .eoc, .data(datain),
                     .conversions);
  i2c_bus_monitor mon (.clk, .scl(i2c_clk), .sda(i2c_data), .frame_valid,
                       .bits, .nbits, .starts, .stops);

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  function automatic logic [7:0] rev(logic [7:0] d);
    return {d[0], d[1], d[2], d[3], d[4], d[5], d[6], d[7]};
  endfunction

  // Reference queue: switch setting at conversion start, value at its end.
  logic [1:0] ed_q [$];
  logic [7:0] val_q [$];
  logic [1:0] ed_at_start;
  logic ale_p = 1'b0;
  int conv_seen = 0;
  always @(posedge clk) begin
    ale_p <= ale;
    if (rst_n && ale && !ale_p) ed_at_start = ed_sw;
    if (conversions != conv_seen) begin
      conv_seen = conversions;
      ed_q.push_back(ed_at_start);
      val_q.push_back(datain);
    end
  end

  // Sample period: between consecutive START conditions of one run.
  int last_start_t = -1, period_min = 1 << 30, period_max = 0, cyc = 0;
  int starts_p = 0;
  always @(posedge clk) begin
    cyc++;
    if (starts != starts_p) begin
      starts_p = starts;
      if (last_start_t >= 0) begin
        if (cyc - last_start_t < period_min) period_min = cyc - last_start_t;
        if (cyc - last_start_t > period_max) period_max = cyc - last_start_t;
      end
      last_start_t = cyc;
    end
  end

  always @(posedge clk) begin
    if (frame_valid) begin
      logic [1:0] e;
      logic [7:0] v;
      frames++;
      checks++;
      if (ed_q.size() == 0) begin
        fail("frame without a conversion");
      end else begin
        e = ed_q.pop_front();
        v = val_q.pop_front();
        checks++;
        if (nbits != 18) fail($sformatf("%0d bits in frame", nbits));
        checks++;
        if (bits[17:11] !== ed_to_addr(ed_sel_e'(e)))
          fail($sformatf("address %h for switch %b", bits[17:11], e));
        checks++;
        if (bits[8:1] !== rev(v)) fail($sformatf("data %b for sample %b", bits[8:1], v));
        if (frames == 1) begin
          checks++;
          if (v !== 8'b1111_0000 || bits[8:1] !== 8'b0000_1111)
            fail("worked example 11110000 -> 00001111");
        end
        case (e)
          2'b01: frames_rx1++;
          2'b10: frames_rx2++;
          2'b11: frames_both++;
          default: fail("frame sent with switch at 00");
        endcase
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired: conversions %0d, frames %0d, starts %0d", conversions, frames, starts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Randomly varying input voltage on channel 0 (the other channels differ).
  initial begin
    for (int i = 0; i < 8; i++) vin[i] = 8'(8'hA5 + i);
    vin[0] = 8'b1111_0000;
    wait (conversions == 1);
    forever begin
      repeat ($urandom_range(50, 400)) @(posedge clk);
      vin[0] = 8'($urandom);
    end
  end

  task automatic run_frames(logic [1:0] ed, int n);
    int s0;
    ed_sw <= ed;
    s0 = frames;
    while (frames < s0 + n) @(posedge clk);
    // Next setting is applied while a frame is on the bus.
    s0 = starts;
    while (starts == s0) @(posedge clk);
  endtask

  initial begin
    int c0, f0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(posedge clk);
    checks++;
    if (conversions != 0 || starts != 0) fail("activity with switch at 00 after reset");
    run_frames(2'b01, 4);
    run_frames(2'b10, 4);
    run_frames(2'b11, 4);
    ed_sw <= 2'b00;
    // The conversion already running is still sent; then all is quiet.
    while (frames != conversions || conversions != conv_seen) @(posedge clk);
    repeat (67 * ADC_DIV + 80 * Q + 50) @(posedge clk);
    repeat (20) @(posedge clk);
    c0 = conversions; f0 = frames;
    repeat (5000) @(posedge clk);
    checks++;
    if (conversions != c0 || frames != f0) fail("activity with switch at 00");
    last_start_t = -1;
    run_frames(2'b01, 3);
    ed_sw <= 2'b00;
    // The conversion already running is still sent; then all is quiet.
    while (frames != conversions || conversions != conv_seen) @(posedge clk);
    repeat (67 * ADC_DIV + 80 * Q + 50) @(posedge clk);
    repeat (50) @(posedge clk);
    checks++;
    if (ed_q.size() != 0) fail("conversion not sent");
    checks++;
    if (frames_rx1 == 0 || frames_rx2 == 0 || frames_both == 0) fail("a switch setting never used");
    // Period: the conversion (64 ADC clocks, up to 3 more to see start and
    // eoc) overlaps the frame (80*QUARTER clocks, shorter here), plus a
    // handful of CPLD clocks of handshake.
    checks++;
    if (period_max - period_min > 2 * ADC_DIV ||
        period_min < 64 * ADC_DIV || period_max > 67 * ADC_DIV + 20)
      fail($sformatf("sample period %0d..%0d clocks", period_min, period_max));
    $display("frames %0d (rx1 %0d, rx2 %0d, both %0d), period %0d..%0d clocks",
             frames, frames_rx1, frames_rx2, frames_both, period_min, period_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
