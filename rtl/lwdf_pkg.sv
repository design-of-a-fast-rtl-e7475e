// Shared constants of the bit-serial sixth-order lattice wave digital filter.
//
// The filter works on 10-bit samples (the system word length). Two guard bits
// on top give a 12-bit internal word, and every sample occupies a frame of
// 14 bit-clock cycles: the 12 word bits plus two further cycles, one for each
// fixed-coefficient multiplication by 0.5 in the signal path. The frame bits
// beyond the word carry the sign extension. These numbers are the ones the
// design is built around; the link latency and the phase of the output word
// follow from the pipeline chosen in lwdf3_link.
package lwdf_pkg;

  // system (I/O) word length in bits
  localparam int unsigned SYS_LEN  = 10;
  // internal word length: two guard bits against overflow
  localparam int unsigned WORD_LEN = SYS_LEN + 2;
  // bit-clock cycles per sample: word length plus one cycle per multiplier
  localparam int unsigned CYCLES   = WORD_LEN + 2;
  // cycles from the LSB of a link's input word to the LSB of its output word
  localparam int unsigned LINK_LAT = 5;
  // cycles from the LSB of a serial adaptor input to the LSB of its outputs
  localparam int unsigned ADAPTOR_LAT = 3;

endpackage
