// rc5_pkg: word type and constants shared by the RC5-32 blocks.
//
// RC5 is parameterised as RC5-w/r/b. This design fixes the word size at
// w = 32 bits, so a block is 64 bits (two words A and B), and the rotate
// amount of a data-dependent rotation is the low log2(w) = 5 bits of a word.
// P32 and Q32 are the key-schedule magic constants Odd((e-2)*2^32) and
// Odd((phi-1)*2^32). The round count r and key length b stay parameters of
// the modules that use them; their defaults (r = 12, b = 16) are the
// RC5-32/12/16 configuration the design is built around.
package rc5_pkg;

  localparam int unsigned W    = 32;  // word size in bits
  localparam int unsigned LOGW = 5;   // bits of a rotate amount

  typedef logic [W-1:0]    word_t;
  typedef logic [LOGW-1:0] rot_t;

  localparam word_t P32 = 32'hb7e1_5163;
  localparam word_t Q32 = 32'h9e37_79b9;

  localparam int unsigned DEFAULT_ROUNDS    = 12;
  localparam int unsigned DEFAULT_KEY_BYTES = 16;

  // Number of words in the expanded key table S: t = 2(r+1).
  function automatic int unsigned table_words(input int unsigned rounds);
    return 2 * (rounds + 1);
  endfunction

  // Number of words in the key array L: c = ceil(b/u), u = w/8, at least 1.
  function automatic int unsigned key_words(input int unsigned key_bytes);
    int unsigned c;
    c = (key_bytes + (W / 8) - 1) / (W / 8);
    return (c == 0) ? 1 : c;
  endfunction

endpackage
