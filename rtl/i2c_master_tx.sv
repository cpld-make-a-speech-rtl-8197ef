// i2c_master_tx: write-only I2C-style bus master of the transmitter.
//
// Each send sends one frame on the two wires scl (i2c_clk) and sda
// (i2c_data), most significant bit first:
//   START, 7-bit dev_addr, write bit 0, acknowledge slot,
//   8-bit data, acknowledge slot, STOP.
// The link is one-way (the receiver's bus pins are inputs only), so in the
// acknowledge slots the master clocks out a 1 (released line) and reads
// nothing back.
//
// Timing: every bus bit lasts four quarters of QUARTER clocks each. In a data
// bit scl is low in quarters 0-1 and high in quarters 2-3; sda changes only at
// the start of quarter 1, a full quarter after scl fell and a quarter before
// it rises, so a receiver that samples both wires with its own clock always
// sees data change while scl is low. START is sda falling in the middle of a
// quarter-bit-long scl-high period; STOP is sda rising while scl is high. A
// frame is 20 bit times (START + 18 bits + STOP) = 80*QUARTER clocks from the
// clock edge that takes send to the one that raises done. With an 8 MHz clock
// the default QUARTER = 5 gives a 400 kHz bus clock and 50 us per frame.
//
// The document names the I2C protocol and the two output pins; frame layout,
// the unacknowledged acknowledge slot and the bus speed are this design's
// choices. scl and sda are driven push-pull from flip-flops (one clock after
// the internal state), matching the document's i2c_clk/i2c_data outputs.
module i2c_master_tx #(
  parameter int unsigned QUARTER = 5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       send,
  input  logic [6:0] dev_addr,
  input  logic [7:0] data,
  output logic       ready,
  output logic       done,
  output logic       scl,
  output logic       sda
);

  localparam int unsigned NBITS = 18;
  localparam int unsigned QW    = (QUARTER > 1) ? $clog2(QUARTER) : 1;

  typedef enum logic [1:0] {S_IDLE, S_START, S_BIT, S_STOP} state_e;

  state_e             state;
  logic [1:0]         phase;
  logic [QW-1:0]      qcnt;
  logic [4:0]         bitcnt;
  logic [NBITS-1:0]   shreg;
  logic               prev_bit;
  logic               tick;
  logic               scl_d, sda_d;

  assign tick  = (qcnt == QW'(QUARTER - 1));
  assign ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      phase    <= '0;
      qcnt     <= '0;
      bitcnt   <= '0;
      shreg    <= '0;
      prev_bit <= 1'b1;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (state == S_IDLE) begin
        qcnt  <= '0;
        phase <= '0;
        if (send) begin
          state  <= S_START;
          shreg  <= {dev_addr, 1'b0, 1'b1, data, 1'b1};
          bitcnt <= '0;
        end
      end else begin
        qcnt <= tick ? '0 : qcnt + 1'b1;
        if (tick) begin
          phase <= phase + 1'b1;
          if (phase == 2'd3) begin
            case (state)
              S_START: begin
                state    <= S_BIT;
                prev_bit <= 1'b0;
              end
              S_BIT: begin
                prev_bit <= shreg[NBITS-1];
                shreg    <= {shreg[NBITS-2:0], 1'b1};
                if (bitcnt == 5'(NBITS - 1)) state <= S_STOP;
                else                         bitcnt <= bitcnt + 1'b1;
              end
              S_STOP: begin
                state <= S_IDLE;
                done  <= 1'b1;
              end
              default: state <= S_IDLE;
            endcase
          end
        end
      end
    end
  end

  // Line levels for the current quarter.
  always_comb begin
    scl_d = 1'b1;
    sda_d = 1'b1;
    case (state)
      S_START: begin
        scl_d = 1'b1;
        sda_d = (phase == 2'd0);
      end
      S_BIT: begin
        scl_d = phase[1];
        sda_d = (phase == 2'd0) ? prev_bit : shreg[NBITS-1];
      end
      S_STOP: begin
        scl_d = phase[1];
        case (phase)
          2'd0:    sda_d = prev_bit;
          2'd3:    sda_d = 1'b1;
          default: sda_d = 1'b0;
        endcase
      end
      default: begin
        scl_d = 1'b1;
        sda_d = 1'b1;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl <= 1'b1;
      sda <= 1'b1;
    end else begin
      scl <= scl_d;
      sda <= sda_d;
    end
  end

  // sda may change while scl is high only as START or STOP.
  a_sda_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (scl && $past(scl) && sda != $past(sda)) |->
      ($past(state) inside {S_START, S_STOP}));

endmodule
