// adc0809_ctrl: conversion controller for an ADC0809 8-bit analog-to-digital
// converter, the sampling front end of the transmitter.
//
// The converter is run through the control lines the transmitter has for it:
// addr[2:0] (input channel), ale (address latch enable), start and eoc (end of
// conversion), plus the 8-bit data bus. One conversion per req pulse:
//   1. addr already carries CHANNEL; ale and start are raised together for
//      PULSE_CYCLES clocks (the ADC0809 latches the address on the ale edge
//      and begins converting on the falling edge of start);
//   2. wait until eoc is seen low (the converter has begun);
//   3. wait until eoc is seen high again (the result is in its output latch);
//   4. capture the data bus into sample and pulse sample_valid for one clock.
// eoc is asynchronous to clk and passes through a two-flop synchronizer, so
// the capture happens two or three clocks after eoc rises. The converter's
// output enable is taken to be tied active on the board, because the
// transmitter drives no OE line. busy is high from req until sample_valid.
//
// The control lines follow the document; the single fixed channel, the pulse
// length and the handshake with the rest of the transmitter are this design's
// choices.
module adc0809_ctrl #(
  parameter logic [2:0]  CHANNEL      = 3'd0,
  parameter int unsigned PULSE_CYCLES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req,
  input  logic       eoc,
  input  logic [7:0] adc_data,
  output logic       ale,
  output logic       start,
  output logic [2:0] addr,
  output logic       busy,
  output logic [7:0] sample,
  output logic       sample_valid
);

  typedef enum logic [1:0] {S_IDLE, S_PULSE, S_WAIT_LOW, S_WAIT_HIGH} state_e;

  localparam int unsigned CW = (PULSE_CYCLES > 1) ? $clog2(PULSE_CYCLES) : 1;

  state_e          state;
  logic [CW-1:0]   pulse_cnt;
  logic [1:0]      eoc_sync;
  logic            eoc_s;

  assign eoc_s = eoc_sync[1];
  assign addr  = CHANNEL;
  assign busy  = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) eoc_sync <= 2'b11;
    else        eoc_sync <= {eoc_sync[0], eoc};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      pulse_cnt    <= '0;
      ale          <= 1'b0;
      start        <= 1'b0;
      sample       <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= 1'b0;
      case (state)
        S_IDLE: begin
          if (req) begin
            state     <= S_PULSE;
            ale       <= 1'b1;
            start     <= 1'b1;
            pulse_cnt <= CW'(PULSE_CYCLES - 1);
          end
        end
        S_PULSE: begin
          if (pulse_cnt == '0) begin
            ale   <= 1'b0;
            start <= 1'b0;
            state <= S_WAIT_LOW;
          end else begin
            pulse_cnt <= pulse_cnt - 1'b1;
          end
        end
        S_WAIT_LOW: begin
          if (!eoc_s) state <= S_WAIT_HIGH;
        end
        S_WAIT_HIGH: begin
          if (eoc_s) begin
            sample       <= adc_data;
            sample_valid <= 1'b1;
            state        <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ale and start only ever rise together and never while a conversion runs.
  a_pulse_pair: assert property (@(posedge clk) disable iff (!rst_n) ale == start);

endmodule
