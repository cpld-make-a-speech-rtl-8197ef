// scrambler: the encryption stage of the transmitter.
//
// Takes one 8-bit ADC sample when in_valid is high and, one clock later,
// presents the scrambled byte on dout with a one-cycle out_valid pulse. dout
// holds its value until the next sample so that the serializer can read it
// at any time. Latency: 1 clock; throughput: one sample per clock.
//
// The transform follows the worked example (11110000 is sent as 00001111);
// which bit permutation or inversion produces it is not fixed by that example,
// so MODE selects one (see speech_pkg), bit-order reversal by default.
module scrambler
  import speech_pkg::*;
#(
  parameter scramble_e MODE = SCR_REVERSE
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] din,
  output logic       out_valid,
  output logic [7:0] dout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) dout <= scramble(MODE, din);
    end
  end

endmodule
