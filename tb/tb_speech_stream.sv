// tb_speech_stream: a speech-band signal through the whole link at
// realistic clock rates, all parameters at their defaults. Transmitter chip
// 8 MHz, receiver chip 10 MHz, ADC0809 at 640 kHz (64 clocks per
// conversion). The input is a 1 kHz tone of 100 LSB amplitude around
// mid-scale, with the E/D switch at 11 so that both receivers play it. For
// 5 ms of signal every sample that reaches dout1 and dout2 must equal the
// ADC's sample, in order, and the spacing of the samples must be at most
// 125 us, i.e. at least the 8 kHz rate of telephone speech. The restored
// samples must swing over most of the tone's range.
module tb_speech_stream;
  logic tx_clk = 1'b0, rx_clk = 1'b0, adc_clk = 1'b0, rst_n = 1'b0;
  logic [1:0] ed_sw = 2'b11;
  logic [7:0] adc_data;
  logic adc_eoc, adc_ale, adc_start, i2c_clk, i2c_data;
  logic [2:0] adc_addr;
  logic [7:0] dout1, dout2;
  logic dout1_valid, dout2_valid;
  logic [7:0] vin [8];
  int conversions;
  int checks = 0, failures = 0;
  int upd1 = 0, upd2 = 0;
  realtime last1 = 0.0, gap_max = 0.0, gap_min = 1.0e9;
  int lo = 255, hi = 0;

  always #62.5 tx_clk = ~tx_clk;     // 8 MHz
  always #50 rx_clk = ~rx_clk;       // 10 MHz
  always #781.25 adc_clk = ~adc_clk; // 640 kHz

  speech_secure_top dut (
    .tx_clk, .rx_clk, .rst_n, .ed_sw, .adc_data, .adc_eoc, .adc_ale,
    .adc_start, .adc_addr, .i2c_clk, .i2c_data, .dout1, .dout2,
    .dout1_valid, .dout2_valid
  );
  adc0809_model adc (.adc_clk, .ale(adc_ale), .start(adc_start), .addr(adc_addr),
                     .vin, .eoc(adc_eoc), .data(adc_data), .conversions);

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // The analog input: a 1 kHz tone, quantized as the converter would.
  initial begin
    for (int i = 0; i < 8; i++) vin[i] = 8'h80;
    forever begin
      #1000;
      vin[0] = 8'($rtoi(128.0 + 100.0 * $sin(2.0 * 3.14159265 * 1000.0 * $realtime * 1.0e-9)));
    end
  end

  logic [7:0] q1 [$], q2 [$];
  int conv_seen = 0;
  always @(posedge tx_clk) begin
    if (conversions != conv_seen) begin
      conv_seen = conversions;
      q1.push_back(adc_data);
      q2.push_back(adc_data);
    end
  end

  always @(posedge rx_clk) begin
    if (rst_n && dout1_valid) begin
      upd1++;
      checks++;
      if (q1.size() == 0) fail("receiver 1 sample without a conversion");
      else if (dout1 !== q1.pop_front()) fail("receiver 1 sample differs from the ADC sample");
      if (upd1 > 1) begin
        if ($realtime - last1 > gap_max) gap_max = $realtime - last1;
        if ($realtime - last1 < gap_min) gap_min = $realtime - last1;
      end
      last1 = $realtime;
      if (dout1 < lo) lo = dout1;
      if (dout1 > hi) hi = dout1;
    end
    if (rst_n && dout2_valid) begin
      upd2++;
      checks++;
      if (q2.size() == 0) fail("receiver 2 sample without a conversion");
      else if (dout2 !== q2.pop_front()) fail("receiver 2 sample differs from the ADC sample");
    end
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    rst_n = 1'b1;
    #5ms;
    $display("%0d samples at each receiver, spacing %0.1f..%0.1f us, range %0d..%0d",
             upd1, gap_min / 1000.0, gap_max / 1000.0, lo, hi);
    checks++;
    if (gap_max > 125000.0) fail($sformatf("sample spacing %0.1f us exceeds 125 us", gap_max / 1000.0));
    checks++;
    if (upd1 < 38 || upd2 < 38) fail("fewer than 8 k samples/s delivered");
    checks++;
    if (lo > 40 || hi < 215) fail("restored tone does not swing over its range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
