// Shared constants and types of the RStrobe-less VIPIC-L readout.
//
// The serializer word length (the number of serializer clock cycles between two
// original ack-hit pulses) is programmable between 7 and 20 bits, the range the
// design notes give for a readout step. Everything else here is a design choice:
// the 5-bit encoding of the word length and the pixel counter width, which is
// made equal to the longest word so that a counter always fits one word.
package vipic_pkg;

  localparam int unsigned MIN_WORD_LEN = 7;   // shortest readout word, bits
  localparam int unsigned MAX_WORD_LEN = 20;  // longest readout word, bits
  localparam int unsigned WLEN_W       = 5;   // width of the word-length setting

  typedef logic [WLEN_W-1:0] word_len_t;

  // Clamp a programmed word length into the supported 7..20 range.
  function automatic word_len_t clamp_len(word_len_t len);
    if (len < word_len_t'(MIN_WORD_LEN)) return word_len_t'(MIN_WORD_LEN);
    if (len > word_len_t'(MAX_WORD_LEN)) return word_len_t'(MAX_WORD_LEN);
    return len;
  endfunction

endpackage
