// tb_speech_secure_top: end-to-end test of the whole link at its default
// parameters. A behavioural ADC0809 on its own clock feeds the transmitter
// chip; the receiver chip runs from a different, unrelated clock. The input
// voltage changes at random while the E/D switch walks through 01, 10, 11,
// 00 and back to 01. Every sample the ADC produces is queued for receiver 1,
// receiver 2 or both, according to the switch setting when its conversion
// started, and every update of dout1/dout2 must match the head of its queue:
// the original sample, restored after scrambling and transmission. The wire
// itself must carry the scrambled byte (the first sample, 11110000, as
// 00001111). Each mechanism must occur at least once: a conversion, a frame
// for receiver 1 only, for receiver 2 only, for both, a frame ignored by the
// station it was not meant for, a conversion running while the previous
// sample is on the bus, and an idle stretch with the switch at 00.
module tb_speech_secure_top;
  import speech_pkg::*;

  logic tx_clk = 1'b0, rx_clk = 1'b0, adc_clk = 1'b0, rst_n = 1'b0;
  logic [1:0] ed_sw = 2'b00;
  logic [7:0] adc_data;
  logic adc_eoc, adc_ale, adc_start, i2c_clk, i2c_data;
  logic [2:0] adc_addr;
  logic [7:0] dout1, dout2;
  logic dout1_valid, dout2_valid;
  logic [7:0] vin [8];
  int conversions;
  logic frame_valid;
  logic [17:0] bits;
  int nbits, starts, stops;
  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_only1 = 0, n_only2 = 0, n_both = 0, n_ignored = 0, n_idle = 0;
  int upd1 = 0, upd2 = 0, frames = 0, n_overlap = 0;

  // Conversion overlapping transmission: eoc low while a frame is on the bus.
  logic overlap_p = 1'b0;
  always @(posedge tx_clk) begin
    overlap_p <= !adc_eoc && (starts != stops);
    if (!adc_eoc && (starts != stops) && !overlap_p) n_overlap++;
  end

  always #5 tx_clk = ~tx_clk;     // transmitter clock, period 10
  always #7 rx_clk = ~rx_clk;     // receiver clock, period 14, unrelated
  always #60 adc_clk = ~adc_clk;  // converter clock, period 120

  speech_secure_top dut (
    .tx_clk, .rx_clk, .rst_n, .ed_sw, .adc_data, .adc_eoc, .adc_ale,
    .adc_start, .adc_addr, .i2c_clk, .i2c_data, .dout1, .dout2,
    .dout1_valid, .dout2_valid
  );
  adc0809_model adc (.adc_clk, .ale(adc_ale), .start(adc_start), .addr(adc_addr),
                     .vin, .eoc(adc_eoc), .data(adc_data), .conversions);
  i2c_bus_monitor mon (.clk(tx_clk), .scl(i2c_clk), .sda(i2c_data), .frame_valid,
                       .bits, .nbits, .starts, .stops);

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  function automatic logic [7:0] rev(logic [7:0] d);
    return {d[0], d[1], d[2], d[3], d[4], d[5], d[6], d[7]};
  endfunction

  // Reference: samples expected at each receiver, and on the wire.
  logic [7:0] q1 [$], q2 [$], qw [$];
  logic [1:0] ed_at_start;
  logic ale_p = 1'b0;
  int conv_seen = 0;
  always @(posedge tx_clk) begin
    ale_p <= adc_ale;
    if (rst_n && adc_ale && !ale_p) ed_at_start = ed_sw;
    if (conversions != conv_seen) begin
      conv_seen = conversions;
      qw.push_back(adc_data);
      if (ed_at_start[0]) q1.push_back(adc_data);
      if (ed_at_start[1]) q2.push_back(adc_data);
      case (ed_at_start)
        2'b01: begin n_only1++; n_ignored++; end
        2'b10: begin n_only2++; n_ignored++; end
        2'b11: n_both++;
        default: fail("conversion with switch at 00");
      endcase
    end
  end

  always @(posedge tx_clk) begin
    if (frame_valid) begin
      logic [7:0] v;
      frames++;
      checks++;
      if (qw.size() == 0) fail("frame without a sample");
      else begin
        v = qw.pop_front();
        checks++;
        if (nbits != 18 || bits[8:1] !== rev(v)) fail($sformatf("wire carries %b for sample %b", bits[8:1], v));
        if (frames == 1) begin
          checks++;
          if (v !== 8'b1111_0000 || bits[8:1] !== 8'b0000_1111) fail("worked example 11110000 -> 00001111 on the wire");
        end
      end
    end
  end

  always @(posedge rx_clk) begin
    if (rst_n && dout1_valid) begin
      upd1++;
      checks++;
      if (q1.size() == 0) fail("receiver 1 output without a sample for it");
      else begin
        logic [7:0] v;
        v = q1.pop_front();
        if (dout1 !== v) fail($sformatf("dout1 %b expected %b", dout1, v));
        if (upd1 == 1 && dout1 !== 8'b1111_0000) fail("worked example not restored at receiver 1");
      end
    end
    if (rst_n && dout2_valid) begin
      upd2++;
      checks++;
      if (q2.size() == 0) fail("receiver 2 output without a sample for it");
      else begin
        logic [7:0] v;
        v = q2.pop_front();
        if (dout2 !== v) fail($sformatf("dout2 %b expected %b", dout2, v));
      end
    end
  end

  initial begin
    repeat (400000) @(posedge tx_clk);
    failures++;
    $display("watchdog expired: conversions %0d frames %0d", conversions, frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) vin[i] = 8'(8'h3C + i);
    vin[0] = 8'b1111_0000;
    wait (conversions == 1);
    forever begin
      repeat ($urandom_range(50, 400)) @(posedge tx_clk);
      vin[0] = 8'($urandom);
    end
  end

  // Holds the switch at ed until n more frames are on the wire, then waits
  // for the START of the next frame so that the next setting is applied
  // while the transmitter is busy sending.
  task automatic run_frames(logic [1:0] ed, int n);
    int f0, s0;
    ed_sw <= ed;
    f0 = frames;
    while (frames < f0 + n) @(posedge tx_clk);
    s0 = starts;
    while (starts == s0) @(posedge tx_clk);
  endtask

  initial begin
    int c0, f0;
    repeat (3) @(posedge tx_clk);
    rst_n = 1'b1;
    repeat (20) @(posedge tx_clk);
    run_frames(2'b01, 5);
    run_frames(2'b10, 5);
    run_frames(2'b11, 5);
    ed_sw <= 2'b00;
    // The conversion already running is still sent; then all is quiet.
    while (frames != conversions || conversions != conv_seen) @(posedge tx_clk);
    repeat (2000) @(posedge tx_clk);
    repeat (50) @(posedge tx_clk);
    c0 = conversions; f0 = starts;
    repeat (4000) @(posedge tx_clk);
    checks++;
    if (conversions != c0 || starts != f0) fail("activity with switch at 00");
    else n_idle++;
    run_frames(2'b01, 3);
    ed_sw <= 2'b00;
    // The conversion already running is still sent; then all is quiet.
    while (frames != conversions || conversions != conv_seen) @(posedge tx_clk);
    repeat (2000) @(posedge tx_clk);
    repeat (100) @(posedge tx_clk);
    checks++;
    if (q1.size() != 0 || q2.size() != 0 || qw.size() != 0) fail("samples lost on the way");
    checks++;
    if (upd1 != n_only1 + n_both || upd2 != n_only2 + n_both) fail("receiver update counts");
    $display("conversions %0d, frames %0d: rx1 only %0d, rx2 only %0d, both %0d, ignored %0d, idle %0d, overlapped %0d; dout1 %0d, dout2 %0d",
             conversions, frames, n_only1, n_only2, n_both, n_ignored, n_idle, n_overlap, upd1, upd2);
    checks++; if (conversions == 0) fail("no conversion");
    checks++; if (n_only1 == 0) fail("no frame for receiver 1 only");
    checks++; if (n_only2 == 0) fail("no frame for receiver 2 only");
    checks++; if (n_both == 0) fail("no broadcast frame");
    checks++; if (n_ignored == 0) fail("no frame ignored by the other station");
    checks++; if (n_idle == 0) fail("no idle stretch");
    checks++; if (n_overlap == 0) fail("conversion never overlapped a frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
