// i2c_slave_rx: one receiving station on the one-way I2C-style link.
//
// scl and sda arrive from the transmitter, asynchronous to clk. Both pass
// through identical two-flop synchronizers, and a third flop keeps the
// previous synchronized level so that edges can be seen:
//   START  sda falls while scl stays high      -> begin a new frame
//   STOP   sda rises while scl stays high      -> end of frame
//   bit    scl rises                           -> sample sda
// A frame is the 7-bit address and the write bit, an acknowledge slot, the
// data byte and a second acknowledge slot, most significant bit first. The
// station takes the frame if the address is OWN_ADDR or the broadcast
// address 0000000 and the direction bit is "write"; otherwise it ignores
// everything up to the next START. A bit is sampled when scl rises; the
// eighth data bit counts only once scl falls again, since the clock pulse of
// a STOP looks like the start of a bit. The data byte then appears on data
// with a one-cycle data_valid pulse three to four clocks after that falling
// scl edge, and data holds it until the next accepted byte. A START in the
// middle of a frame restarts reception; a STOP in the middle abandons it.
// The station never drives the bus (no acknowledge), as the receiver's bus
// pins are inputs only.
//
// Because the wires are sampled with the receiver's own clock, a quarter of a
// bus bit must last at least two receiver clocks; with the transmitter and
// receiver running from equal clocks that holds for any QUARTER >= 2.
//
// Addressing the two stations and broadcasting to both is this design's
// reading of the document's "E/D switch selects receiver 1, 2 or both".
module i2c_slave_rx
  import speech_pkg::*;
#(
  parameter logic [6:0] OWN_ADDR = ADDR_RX1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scl,
  input  logic       sda,
  output logic [7:0] data,
  output logic       data_valid
);

  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_ACK1, S_DATA, S_LAST, S_WAIT} state_e;

  state_e      state;
  logic [2:0]  scl_sync, sda_sync;   // [1] synchronized, [2] previous
  logic        scl_s, scl_p, sda_s, sda_p;
  logic        start_det, stop_det, scl_rise, scl_fall;
  logic [2:0]  bitcnt;
  logic [7:0]  sh;
  logic [7:0]  byte_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_sync <= 3'b111;
      sda_sync <= 3'b111;
    end else begin
      scl_sync <= {scl_sync[1:0], scl};
      sda_sync <= {sda_sync[1:0], sda};
    end
  end

  assign scl_s     = scl_sync[1];
  assign scl_p     = scl_sync[2];
  assign sda_s     = sda_sync[1];
  assign sda_p     = sda_sync[2];
  assign start_det = scl_s && scl_p &&  sda_p && !sda_s;
  assign stop_det  = scl_s && scl_p && !sda_p &&  sda_s;
  assign scl_rise  = scl_s && !scl_p;
  assign scl_fall  = !scl_s && scl_p;
  assign byte_in   = {sh[6:0], sda_s};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      bitcnt     <= '0;
      sh         <= '0;
      data       <= '0;
      data_valid <= 1'b0;
    end else begin
      data_valid <= 1'b0;
      if (start_det) begin
        state  <= S_ADDR;
        bitcnt <= '0;
      end else if (stop_det) begin
        state <= S_IDLE;
      end else if (scl_rise) begin
        case (state)
          S_ADDR: begin
            sh     <= byte_in;
            bitcnt <= bitcnt + 1'b1;
            if (bitcnt == 3'd7) begin
              if ((byte_in[7:1] == OWN_ADDR || byte_in[7:1] == ADDR_BROADCAST)
                  && byte_in[0] == 1'b0)
                state <= S_ACK1;
              else
                state <= S_IDLE;
            end
          end
          S_ACK1: begin
            state  <= S_DATA;
            bitcnt <= '0;
          end
          S_DATA: begin
            sh     <= byte_in;
            bitcnt <= bitcnt + 1'b1;
            if (bitcnt == 3'd7) state <= S_LAST;
          end
          default: ;
        endcase
      end else if (scl_fall && state == S_LAST) begin
        // The eighth data bit is final once scl falls: a STOP would have
        // come while scl was still high.
        data       <= sh;
        data_valid <= 1'b1;
        state      <= S_WAIT;
      end
    end
  end

endmodule
