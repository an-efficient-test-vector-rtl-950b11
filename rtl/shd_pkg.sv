// shd_pkg -- shared types and the default code of the selective Huffman
// test-data decompressor.
//
// The default code is the small worked example of the scheme: test data cut
// into 4-bit blocks, the three most frequent blocks (0010, 0100, 0110) coded
// with a Huffman tree, every other block sent raw. A codeword is a flag bit
// followed either by the Huffman code of a frequent block (flag 1) or by the
// block itself (flag 0):
//
//     block 0010 -> 1 0        block 0100 -> 1 10      block 0110 -> 1 11
//     any other block xxxx -> 0 xxxx
//
// The tables below describe only the part after the flag. CODE_BITS holds
// each Huffman code right aligned (first received bit most significant),
// CODE_LEN its length in bits, PATTERN the b-bit block it stands for. Entry i
// of each table belongs to the same symbol. The bit order of a block is the
// order in which its bits travel: the leftmost (most significant) bit is the
// first to be received and the first to enter the scan chain.
// The code is the scheme's worked example; the table layout is this
// design's own.
package shd_pkg;

  // Block size b of the default code.
  localparam int unsigned DEF_B      = 4;
  // Number of coded (frequent) blocks n of the default code.
  localparam int unsigned DEF_N      = 3;
  // Longest Huffman code after the flag bit.
  localparam int unsigned DEF_MAX_CL = 2;
  // Width of a CODE_LEN entry.
  localparam int unsigned CL_W       = 8;

  localparam logic [DEF_N-1:0][DEF_MAX_CL-1:0] DEF_CODE_BITS =
      {2'b11, 2'b10, 2'b00};            // entry 2, 1, 0
  localparam logic [DEF_N-1:0][CL_W-1:0]       DEF_CODE_LEN  =
      {8'd2, 8'd2, 8'd1};
  localparam logic [DEF_N-1:0][DEF_B-1:0]      DEF_PATTERN   =
      {4'b0110, 4'b0100, 4'b0010};

  // Decoder states. FLAG waits for the flag bit of the next codeword, CODED
  // walks the Huffman tree, RAW passes the b bits of an uncoded block.
  typedef enum logic [1:0] {
    DEC_FLAG  = 2'd0,
    DEC_CODED = 2'd1,
    DEC_RAW   = 2'd2
  } dec_state_e;

endpackage
