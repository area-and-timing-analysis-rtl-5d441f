// pmatch_pkg: types and constants shared by the P-Match compressor.
//
// P-Match codes every group of input bits as one symbol: an all-zero group
// becomes '0', an all-one group '1', and a mixed group becomes 'W' when it
// equals the same group of a dictionary entry and 'X' when it does not. A
// symbol is held in two bits (sym_t). The encoding of the four symbols is this
// design's choice; the alphabet itself follows the P-Match scheme.
//
// Symbol arrays are packed with the highest index holding the leftmost symbol,
// i.e. the symbol made from the most significant bits of the input.
//
// The 2:1 dictionary holds the four 8-bit entries of the P-Match example
// (10100101, 10101010, 01011010, 01010101). No dictionary is published for the
// 4:1 configuration; DICT_4TO1 is this design's choice, built from 4-bit groups
// 1100/0011/1010/0101 so that a line of repeated 1100 compresses to
// "wxwx...wx", the result quoted for that configuration.
package pmatch_pkg;

  typedef enum logic [1:0] {
    SYM_0 = 2'b00,   // group is all zeros
    SYM_W = 2'b01,   // mixed group, equal to the dictionary group
    SYM_X = 2'b10,   // mixed group, not equal to the dictionary group
    SYM_1 = 2'b11    // group is all ones
  } sym_t;

  // Number of dictionary entries, hence of candidate words per line.
  localparam int unsigned N_CAND = 4;
  // Symbols produced by one segment against one dictionary entry.
  localparam int unsigned SYM_PER_SEG = 4;
  // Width of the uncompressed input word.
  localparam int unsigned LINE_W = 64;

  // Dictionaries, entry k at index k.
  localparam logic [N_CAND-1:0][7:0]  DICT_2TO1 = {8'h55, 8'h5A, 8'hAA, 8'hA5};
  localparam logic [N_CAND-1:0][15:0] DICT_4TO1 = {16'h5A5A, 16'hA5A5, 16'h3C3C, 16'hC3C3};

  // PSU variants.
  localparam int unsigned PSU_ADD8 = 1;  // three counters per word, eight adders
  localparam int unsigned PSU_ADD5 = 2;  // zeros/ones counted once, five adders
  localparam int unsigned PSU_CNTW = 3;  // counter W only, no adders

endpackage
