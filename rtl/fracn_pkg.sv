// fracn_pkg: widths and constants shared by the digital path of the
// fractional-N GFSK synthesizer.
//
// The numbers follow the prototype: a 16-bit sigma-delta input word
// (carrier frequency plus modulation), a 6-bit divide control word for the
// 64-modulus divider, a 10-bit modulation sample stream at 20 MHz, a 5-bit
// charge-pump gain word and carry pipelining every two bits. The modulation
// weight (MOD_SHIFT), the sample counter size (OSR) and the data history
// length (SPAN) of the transmit filter are choices of this design.
package fracn_pkg;
  localparam int unsigned IN_W      = 16; // sigma-delta input word
  localparam int unsigned FRAC_W    = 10; // fractional bits fed back in each MASH stage
  localparam int unsigned OUT_W     = 6;  // divide control word (64 moduli)
  localparam int unsigned MOD_W     = 10; // modulation sample width
  localparam int unsigned GAIN_W    = 5;  // charge-pump current D/A word
  localparam int unsigned GRP       = 2;  // bits per carry-pipeline group
  localparam int unsigned MOD_SHIFT = 4;  // modulation LSB = 2^-6 of one divide step
  localparam int unsigned OSR       = 8;  // 20 MHz samples per 2.5 Mb/s data bit
  localparam int unsigned SPAN      = 4;  // data bits seen by the transmit filter
  localparam int unsigned DIV_BASE  = 64; // divide value for a control word of zero
endpackage
