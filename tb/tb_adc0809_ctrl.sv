// tb_adc0809_ctrl: runs the ADC0809 controller against the behavioural
// converter model for a series of random input voltages on every channel.
// Checked: addr carries the channel; ale and start rise together and last
// PULSE_CYCLES clocks; no sample is reported before the converter raises eoc
// and the report comes 2 to 3 clocks after eoc rises; the captured sample is
// the model's value for the configured channel; busy covers the conversion.
module tb_adc0809_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req = 1'b0;
  logic ale, start, busy, sample_valid, eoc;
  logic [2:0] addr;
  logic [7:0] sample, adc_data;
  logic [7:0] vin [8];
  int conversions;
  int checks = 0, failures = 0;
  localparam logic [2:0] CH = 3'd5;
  localparam int PULSE = 3;

  always #5 clk = ~clk;

  adc0809_ctrl #(.CHANNEL(CH), .PULSE_CYCLES(PULSE)) dut (
    .clk, .rst_n, .req, .eoc, .adc_data, .ale, .start, .addr, .busy,
    .sample, .sample_valid
  );

  adc0809_model #(.EOC_DELAY(4), .CONV_CYCLES(30)) adc (
    .adc_clk(clk), .ale, .start, .addr, .vin, .eoc, .data(adc_data), .conversions
  );

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // Pulse width of ale/start and the eoc-to-sample delay, measured here.
  int ale_len = 0, since_eoc = 1000;
  logic eoc_p = 1'b1;
  always @(posedge clk) begin
    eoc_p <= eoc;
    if (ale) ale_len <= ale_len + 1;
    if (!ale && ale_len != 0) begin
      checks++;
      if (ale_len != PULSE) fail($sformatf("ale pulse %0d clocks", ale_len));
      ale_len <= 0;
    end
    if (eoc && !eoc_p) since_eoc <= 1; else if (since_eoc < 1000) since_eoc <= since_eoc + 1;
    if (rst_n) begin
      checks++;
      if (ale !== start) fail("ale and start differ");
      checks++;
      if (addr !== CH) fail("wrong channel address");
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) vin[i] = 8'(i * 17 + 3);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 40; n++) begin
      logic [7:0] v;
      int waited;
      v = (n == 0) ? 8'b1111_0000 : 8'($urandom);
      vin[CH] <= v;
      vin[0]  <= ~v;
      @(posedge clk);
      req <= 1'b1;
      @(posedge clk);
      req <= 1'b0;
      #1;
      checks++;
      if (!busy) fail("busy not raised");
      waited = 0;
      while (!sample_valid && waited < 200) begin
        @(posedge clk); #1;
        waited++;
        if (!sample_valid && eoc && adc.running == 1'b0 && waited > 5 && !busy)
          fail("controller went idle without a sample");
      end
      checks++;
      if (!sample_valid) fail("no sample");
      checks++;
      if (since_eoc < 2 || since_eoc > 3) fail($sformatf("sample %0d clocks after eoc rose", since_eoc));
      checks++;
      if (sample !== v) fail($sformatf("sample %h expected %h", sample, v));
      checks++;
      if (conversions != n + 1) fail("conversion count");
      @(posedge clk); #1;
      checks++;
      if (busy || sample_valid) fail("busy or valid after sample");
      repeat ($urandom_range(0, 5)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
