// tx_cpld: the transmitter chip of the secure speech link.
//
// Every sample goes through three steps:
//   convert  - adc0809_ctrl runs one ADC0809 conversion on channel
//              ADC_CHANNEL and captures the 8-bit sample (datain);
//   scramble - scrambler turns the sample into its scrambled form, which is
//              held in a one-byte buffer together with the E/D switch
//              setting read when its conversion started;
//   send     - i2c_master_tx sends the buffered byte on i2c_clk/i2c_data to
//              the address of the station(s) that setting selects
//              (01 receiver 1, 10 receiver 2, 11 both via broadcast).
// The next conversion starts as soon as the previous sample has left the
// converter and the buffer is free, so it runs while the previous sample is
// on the bus. With the switch at 00 no new conversion starts; a sample
// already converted is still sent. The switch is synchronized with two
// flops and read once per sample, so a frame never mixes two settings.
//
// Sample period: the longer of the conversion and the frame (80*QUARTER
// clocks), plus a few clocks of handshake. With an ADC0809 clocked at 640 kHz
// (64 clocks, 100 us per conversion) and an 8 MHz chip clock with QUARTER = 5
// (50 us per frame) the conversion sets the pace: about 10 k samples/s.
// Conversion and frame have fixed lengths, so samples are evenly spaced.
//
// The three steps, the ADC lines and the two bus outputs follow the
// document; overlapping conversion with transmission and the one-byte
// buffer are this design's choices.
module tx_cpld
  import speech_pkg::*;
#(
  parameter int unsigned QUARTER     = 5,
  parameter scramble_e   MODE        = SCR_REVERSE,
  parameter logic [2:0]  ADC_CHANNEL = 3'd0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] ed_sw,
  input  logic [7:0] datain,
  input  logic       eoc,
  output logic       ale,
  output logic       start,
  output logic [2:0] addr,
  output logic       i2c_clk,
  output logic       i2c_data
);

  logic [1:0]  ed_sync0, ed_sync1;
  ed_sel_e     ed_s;        // synchronized switch
  ed_sel_e     ed_conv;     // setting of the conversion in progress
  ed_sel_e     ed_buf;      // setting of the buffered byte
  logic        adc_req, adc_busy, sample_valid;
  logic [7:0]  sample;
  logic        scr_valid;
  logic [7:0]  scr_byte;
  logic        buf_full, send;
  logic        bus_ready, bus_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ed_sync0 <= '0;
      ed_sync1 <= '0;
    end else begin
      ed_sync0 <= ed_sw;
      ed_sync1 <= ed_sync0;
    end
  end
  assign ed_s = ed_sel_e'(ed_sync1);

  // A new conversion may start when the converter is idle, no sample is on
  // its way into the buffer and the buffer is free.
  assign adc_req = (ed_s != ED_NONE) && !adc_busy && !sample_valid &&
                   !scr_valid && !buf_full;
  assign send    = buf_full && bus_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ed_conv  <= ED_NONE;
      ed_buf   <= ED_NONE;
      buf_full <= 1'b0;
    end else begin
      if (adc_req)   ed_conv <= ed_s;
      if (scr_valid) begin
        buf_full <= 1'b1;
        ed_buf   <= ed_conv;
      end else if (send) begin
        buf_full <= 1'b0;
      end
    end
  end

  adc0809_ctrl #(
    .CHANNEL     (ADC_CHANNEL)
  ) u_adc (
    .clk          (clk),
    .rst_n        (rst_n),
    .req          (adc_req),
    .eoc          (eoc),
    .adc_data     (datain),
    .ale          (ale),
    .start        (start),
    .addr         (addr),
    .busy         (adc_busy),
    .sample       (sample),
    .sample_valid (sample_valid)
  );

  // The scrambler's output register is the one-byte buffer.
  scrambler #(
    .MODE (MODE)
  ) u_scr (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (sample_valid),
    .din       (sample),
    .out_valid (scr_valid),
    .dout      (scr_byte)
  );

  i2c_master_tx #(
    .QUARTER (QUARTER)
  ) u_bus (
    .clk      (clk),
    .rst_n    (rst_n),
    .send     (send),
    .dev_addr (ed_to_addr(ed_buf)),
    .data     (scr_byte),
    .ready    (bus_ready),
    .done     (bus_done),
    .scl      (i2c_clk),
    .sda      (i2c_data)
  );

  // A new sample never overwrites one that has not been sent, and nothing
  // is sent for the 00 setting.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    scr_valid |-> !buf_full);
  a_no_none: assert property (@(posedge clk) disable iff (!rst_n)
    send |-> ed_buf != ED_NONE);
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n)
    bus_done |-> bus_ready);

endmodule
