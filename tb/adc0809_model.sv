// adc0809_model: behavioural model of the digital interface of an ADC0809
// 8-bit, 8-channel converter, for simulation only (not synthesizable intent).
//
// The channel on addr is latched on the rising edge of ale. On the falling
// edge of start a conversion begins: eoc drops EOC_DELAY adc_clk cycles later and
// rises again CONV_CYCLES adc_clk cycles after start fell, at which moment
// the value of vin[channel] is copied to the output latch data (output
// enable taken as tied active). A real ADC0809 needs about 8 clocks before
// eoc falls and 64 clocks per conversion; a testbench may shorten both.
// conversions counts completed conversions.
module adc0809_model #(
  parameter int unsigned EOC_DELAY   = 8,
  parameter int unsigned CONV_CYCLES = 64
) (
  input  logic       adc_clk,
  input  logic       ale,
  input  logic       start,
  input  logic [2:0] addr,
  input  logic [7:0] vin [8],
  output logic       eoc,
  output logic [7:0] data,
  output int         conversions
);

  logic [2:0] ch;
  int         cnt;
  bit         running;

  initial begin
    eoc         = 1'b1;
    data        = 8'h00;
    conversions = 0;
    ch          = 3'd0;
    cnt         = 0;
    running     = 1'b0;
  end

  // ale and start act on their edges, independent of adc_clk.
  always @(posedge ale) ch = addr;
  always @(negedge start) begin
    running = 1'b1;
    cnt     = 0;
  end

  always @(posedge adc_clk) begin
    if (running) begin
      cnt = cnt + 1;
      if (cnt == EOC_DELAY) eoc <= 1'b0;
      if (cnt == CONV_CYCLES) begin
        eoc         <= 1'b1;
        data        <= vin[ch];
        running      = 1'b0;
        conversions <= conversions + 1;
      end
    end
  end

endmodule
