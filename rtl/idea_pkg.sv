// idea_pkg: widths, counts and data types shared by the temporal IDEA engine.
//
// IDEA works on a 64-bit block split into four 16-bit words X1..X4 and uses
// 52 16-bit sub-keys: six per round for eight rounds and four for the output
// transformation. The packed types below keep the IDEA numbering in the
// index: element [0] of every array is the most significant word, so X1 is
// block[0] (bits 63:48) and sub-key s1 of a flat 52-entry set is keys[0].
package idea_pkg;

  localparam int unsigned WORD_W            = 16;
  localparam int unsigned BLOCK_W           = 64;
  localparam int unsigned KEY_W             = 128;
  localparam int unsigned NUM_ROUNDS        = 8;
  // eight rounds plus the output transformation
  localparam int unsigned NUM_STAGES        = NUM_ROUNDS + 1;
  localparam int unsigned KEYS_PER_ROUND    = 6;
  localparam int unsigned KEYS_PER_OUTPUT   = 4;
  localparam int unsigned NUM_SUBKEYS       = KEYS_PER_ROUND * NUM_ROUNDS + KEYS_PER_OUTPUT;

  typedef logic [WORD_W-1:0]                 word_t;
  typedef word_t [0:3]                       block_t;       // X1..X4, X1 in bits 63:48
  typedef word_t [0:KEYS_PER_ROUND-1]        round_keys_t;  // six sub-keys of one round
  typedef word_t [0:KEYS_PER_OUTPUT-1]       out_keys_t;    // four sub-keys of the output stage
  typedef word_t [0:NUM_SUBKEYS-1]           subkeys_t;     // s1..s52
  typedef logic [KEY_W-1:0]                  key_t;

endpackage
