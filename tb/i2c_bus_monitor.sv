// i2c_bus_monitor: passive decoder of the two-wire link for testbenches.
//
// Samples scl and sda on every clk edge. sda falling while scl is high is a
// START, sda rising while scl is high a STOP; between them sda is sampled
// at every rising scl edge and the bit is counted when scl falls again (so
// the clock pulse that carries the STOP is not taken for a bit). At STOP, frame_valid pulses for one
// clock with nbits (the number of bits seen) and bits (the last 18 of them,
// first bit in bit 17): [17:11] address, [10] read/write, [9] first
// acknowledge slot, [8:1] data, [0] second acknowledge slot. starts and
// stops count the conditions seen.
module i2c_bus_monitor (
  input  logic        clk,
  input  logic        scl,
  input  logic        sda,
  output logic        frame_valid,
  output logic [17:0] bits,
  output int          nbits,
  output int          starts,
  output int          stops
);

  logic        scl_p, sda_p, in_frame, pending, have;
  logic [17:0] sh;
  int          n;

  initial begin
    scl_p = 1'b1; sda_p = 1'b1; in_frame = 1'b0; pending = 1'b0; have = 1'b0;
    sh = '0; n = 0; bits = '0; nbits = 0; frame_valid = 1'b0;
    starts = 0; stops = 0;
  end

  always @(posedge clk) begin
    frame_valid <= 1'b0;
    scl_p <= scl;
    sda_p <= sda;
    if (scl && scl_p && sda_p && !sda) begin
      in_frame <= 1'b1;
      have     <= 1'b0;
      n        <= 0;
      starts   <= starts + 1;
    end else if (scl && scl_p && !sda_p && sda) begin
      stops <= stops + 1;
      if (in_frame) begin
        frame_valid <= 1'b1;
        bits        <= sh;
        nbits       <= n;
      end
      in_frame <= 1'b0;
    end else if (scl && !scl_p && in_frame) begin
      pending <= sda;
      have    <= 1'b1;
    end else if (!scl && scl_p && in_frame && have) begin
      have <= 1'b0;
      sh <= {sh[16:0], pending};
      n  <= n + 1;
    end
  end

endmodule
