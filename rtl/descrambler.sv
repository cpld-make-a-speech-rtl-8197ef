// descrambler: the decryption stage of one receiving station.
//
// Takes one received byte when in_valid is high and, one clock later,
// presents the original sample on dout with a one-cycle out_valid pulse.
// dout holds its value between samples, as the DAC that it drives needs.
// Latency: 1 clock.
//
// The receiver undoes the scrambling "by the same approach": every
// transform selectable by MODE is its own inverse, so the same function is
// applied again. MODE must match the transmitter's scrambler.
module descrambler
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
      if (in_valid) dout <= descramble(MODE, din);
    end
  end

endmodule
