// speech_secure_top: the digital part of the secure speech link, transmitter
// chip and receiver chip joined by their two-wire serial bus.
//
// Signal path: microphone, amplifier and filter (analog, outside) feed an
// ADC0809 whose control lines and data bus are the adc_* ports. tx_cpld
// converts, scrambles and sends each sample over i2c_clk/i2c_data to the
// station(s) chosen by the E/D switch ed_sw. rx_cpld receives, descrambles
// and drives dout1 and dout2, each to a DAC0808 followed by filter,
// amplifier and speaker (analog, outside). The bus wires are also brought out
// so the link can be observed.
//
// The two chips have their own clocks (tx_clk, rx_clk) and share rst_n; the
// receiver clock must give at least two samples per quarter bus bit (see
// i2c_slave_rx). End-to-end latency of a sample is one ADC conversion, a few
// clocks of handshake, one bus frame (80*QUARTER tx clocks) and about five
// rx clocks.
module speech_secure_top
  import speech_pkg::*;
#(
  parameter int unsigned QUARTER = 5,
  parameter scramble_e   MODE    = SCR_REVERSE
) (
  input  logic       tx_clk,
  input  logic       rx_clk,
  input  logic       rst_n,
  input  logic [1:0] ed_sw,
  input  logic [7:0] adc_data,
  input  logic       adc_eoc,
  output logic       adc_ale,
  output logic       adc_start,
  output logic [2:0] adc_addr,
  output logic       i2c_clk,
  output logic       i2c_data,
  output logic [7:0] dout1,
  output logic [7:0] dout2,
  output logic       dout1_valid,
  output logic       dout2_valid
);

  tx_cpld #(
    .QUARTER (QUARTER),
    .MODE    (MODE)
  ) u_tx (
    .clk      (tx_clk),
    .rst_n    (rst_n),
    .ed_sw    (ed_sw),
    .datain   (adc_data),
    .eoc      (adc_eoc),
    .ale      (adc_ale),
    .start    (adc_start),
    .addr     (adc_addr),
    .i2c_clk  (i2c_clk),
    .i2c_data (i2c_data)
  );

  rx_cpld #(
    .MODE (MODE)
  ) u_rx (
    .clk         (rx_clk),
    .rst_n       (rst_n),
    .sclk        (i2c_clk),
    .sdata       (i2c_data),
    .dout1       (dout1),
    .dout2       (dout2),
    .dout1_valid (dout1_valid),
    .dout2_valid (dout2_valid)
  );

endmodule
