// rx_cpld: the receiver chip of the secure speech link, holding two
// receiving stations.
//
// Both stations listen to the same two input wires, sclk and sdata. Each is
// an i2c_slave_rx with its own address (receiver 1: ADDR_RX1, receiver 2:
// ADDR_RX2) followed by a descrambler. A frame addressed to one station is
// taken only by that station; a frame sent to the broadcast address is taken
// by both. Each station's descrambled sample drives its 8-bit output (dout1,
// dout2, to a DAC0808 each) and is held there until that station's next
// sample; dout1_valid/dout2_valid pulse for one clock on every update.
// Latency: dout changes 4 to 5 clocks after the falling sclk edge that
// ends the last data bit.
//
// Two stations in one chip, the sclk/sdata inputs and the dout1/dout2
// outputs follow the document; the addresses are this design's choice.
module rx_cpld
  import speech_pkg::*;
#(
  parameter scramble_e MODE = SCR_REVERSE
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sclk,
  input  logic       sdata,
  output logic [7:0] dout1,
  output logic [7:0] dout2,
  output logic       dout1_valid,
  output logic       dout2_valid
);

  logic [7:0] byte1, byte2;
  logic       byte1_valid, byte2_valid;

  i2c_slave_rx #(.OWN_ADDR(ADDR_RX1)) u_rx1 (
    .clk(clk), .rst_n(rst_n), .scl(sclk), .sda(sdata),
    .data(byte1), .data_valid(byte1_valid)
  );

  descrambler #(.MODE(MODE)) u_dscr1 (
    .clk(clk), .rst_n(rst_n), .in_valid(byte1_valid), .din(byte1),
    .out_valid(dout1_valid), .dout(dout1)
  );

  i2c_slave_rx #(.OWN_ADDR(ADDR_RX2)) u_rx2 (
    .clk(clk), .rst_n(rst_n), .scl(sclk), .sda(sdata),
    .data(byte2), .data_valid(byte2_valid)
  );

  descrambler #(.MODE(MODE)) u_dscr2 (
    .clk(clk), .rst_n(rst_n), .in_valid(byte2_valid), .din(byte2),
    .out_valid(dout2_valid), .dout(dout2)
  );

endmodule
