// lzw_pkg: constants and types shared by the LZW decompressor modules.
//
// The decompressor works on a binary alphabet: a compressed program is a
// stream of fixed-width codes, and every code expands into a string of bits.
// Codes 0 and 1 are the two one-bit roots, code 2 is reserved (the chain walk
// stops on any prefix code at or below ROOT_LIMIT = 8'h02), and codes 3 and up
// are dictionary entries built while decoding. CODE_W = 8 and DICT_DEPTH = 256
// follow the 256 x 8 code RAM and the 256 x 1 char RAM of the block diagram;
// the reserved code 2 and the bit order are this design's own choices.
package lzw_pkg;

  localparam int unsigned CODE_W     = 8;    // width of one compressed code
  localparam int unsigned DICT_DEPTH = 256;  // code RAM / char RAM entries
  localparam int unsigned STACK_DEPTH = 256; // stack RAM entries
  localparam int unsigned ROOT_LIMIT = 2;    // codes <= 8'h02 end a chain walk
  localparam int unsigned FIRST_FREE = 3;    // first code the dictionary assigns
  localparam int unsigned IN_DEPTH   = 16;   // IN BUF words
  localparam int unsigned OUT_DEPTH  = 16;   // OUT BUF words
  localparam int unsigned OUT_W      = 32;   // OUT BUF word width

  // Decoder states, in the order the state diagram names them.
  typedef enum logic [2:0] {
    IDLE       = 3'd0,
    RD_DATA    = 3'd1,
    SCAN_TABLE = 3'd2,
    CHK_CODE   = 3'd3,
    ADD_TABLE  = 3'd4,
    OUT_STRING = 3'd5
  } state_t;

endpackage
