// shd_tb_pkg -- reference data and a software encoder for the testbenches.
//
// FIG1 is a 60-block test set in 4-bit blocks whose three most frequent
// blocks are 0010 (22 times), 0100 (13) and 0110 (7). enc4 encodes one
// 4-bit block with the default selective code, written out here from the
// code table independently of the RTL:
//   0010 -> 10, 0100 -> 110, 0110 -> 111, any other block b -> 0 b.
// Coded with it the 240 bits of FIG1 become 22*2 + 13*3 + 7*3 + 18*5 = 194.
package shd_tb_pkg;

  typedef struct {
    logic [8:0] bits;   // codeword, first bit to send at bits[len-1]
    int         len;
  } cw_t;

  localparam logic [3:0] FIG1 [60] = '{
    4'h2, 4'h4, 4'h2, 4'h6, 4'h0, 4'h2, 4'hB, 4'h4, 4'h2, 4'h4,
    4'h6, 4'h2, 4'h2, 4'h4, 4'h2, 4'h6, 4'h0, 4'h6, 4'h2, 4'h4,
    4'h6, 4'h2, 4'h2, 4'h0, 4'h2, 4'h6, 4'h2, 4'h2, 4'h2, 4'h4,
    4'h4, 4'h6, 4'h2, 4'h2, 4'h8, 4'h5, 4'h1, 4'h4, 4'h2, 4'h7,
    4'h2, 4'h2, 4'h7, 4'h7, 4'h4, 4'h4, 4'h8, 4'h5, 4'hC, 4'h4,
    4'h4, 4'h7, 4'h2, 4'h2, 4'h7, 4'hD, 4'h2, 4'h4, 4'hF, 4'h3
  };

  localparam int FIG1_BITS      = 240;
  localparam int FIG1_CODE_BITS = 194;

  function automatic cw_t enc4(logic [3:0] blk);
    cw_t c;
    case (blk)
      4'b0010: begin c.bits = 9'b10;  c.len = 2; end
      4'b0100: begin c.bits = 9'b110; c.len = 3; end
      4'b0110: begin c.bits = 9'b111; c.len = 3; end
      default: begin c.bits = 9'({1'b0, blk}); c.len = 5; end
    endcase
    return c;
  endfunction

  function automatic bit is_coded4(logic [3:0] blk);
    return blk == 4'b0010 || blk == 4'b0100 || blk == 4'b0110;
  endfunction

endpackage
