// speech_pkg: types, constants and the scrambling functions shared by the
// transmitter and the receiver of the secure speech link.
//
// E/D switch: a two-position switch on the transmitter chooses which
// receiving station gets the samples: 01 receiver 1, 10 receiver 2, 11 both.
// The code 00 is this design's choice: nothing is sent.
//
// Each receiving station has a 7-bit bus address. "Both" is sent to the
// broadcast (general call) address 0000000, which every station accepts.
// The address values themselves are this design's choice.
//
// Scrambling: the one worked example is that the sample 11110000 leaves the
// transmitter as 00001111. Bit-order reversal, bitwise inversion and a nibble
// swap all produce that, so the transform is a parameter of the scrambler and
// the descrambler; bit-order reversal is the default. All three are their own
// inverse, so the receiver applies the same transform again.
package speech_pkg;

  typedef enum logic [1:0] {
    ED_NONE = 2'b00,
    ED_RX1  = 2'b01,
    ED_RX2  = 2'b10,
    ED_BOTH = 2'b11
  } ed_sel_e;

  typedef enum logic [1:0] {
    SCR_REVERSE = 2'd0,   // bit 7 <-> bit 0, bit 6 <-> bit 1, ...
    SCR_INVERT  = 2'd1,   // every bit complemented
    SCR_SWAP    = 2'd2    // high and low nibble exchanged
  } scramble_e;

  localparam logic [6:0] ADDR_RX1       = 7'h51;
  localparam logic [6:0] ADDR_RX2       = 7'h52;
  localparam logic [6:0] ADDR_BROADCAST = 7'h00;

  // Bus address that the E/D switch position selects (ED_NONE maps to the
  // broadcast address but is never sent).
  function automatic logic [6:0] ed_to_addr(ed_sel_e ed);
    case (ed)
      ED_RX1:  return ADDR_RX1;
      ED_RX2:  return ADDR_RX2;
      default: return ADDR_BROADCAST;
    endcase
  endfunction

  function automatic logic [7:0] scramble(scramble_e mode, logic [7:0] d);
    logic [7:0] r;
    case (mode)
      SCR_INVERT: r = ~d;
      SCR_SWAP:   r = {d[3:0], d[7:4]};
      default:    for (int i = 0; i < 8; i++) r[i] = d[7-i];
    endcase
    return r;
  endfunction

  // Each transform is an involution, so descrambling repeats it.
  function automatic logic [7:0] descramble(scramble_e mode, logic [7:0] d);
    return scramble(mode, d);
  endfunction

endpackage
