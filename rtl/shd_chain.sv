// shd_chain -- decompressor for one scan chain: decoder plus serializer.
//
// The decoder turns the compressed bit stream into b-bit blocks and the
// serializer shifts them into the scan chain on the fast scan clock, so
// decoding the next codeword overlaps with shifting out the previous block.
// USE_RAM selects the decoder: 0 for the state-machine decoder of a
// selective Huffman code (code given by CODE_BITS/CODE_LEN/PATTERN), 1 for
// the table-lookup decoder of the two-length code (flag + A address bits,
// table written through tbl_*; unused with USE_RAM = 0).
//
// Rate rule: with in_valid every R clocks, every codeword must be at least
// B / R bits long (the shortest flag-1 codeword of the default code is 2
// bits, so R >= 2 for B = 4). Then the tester never waits and overrun stays
// low. Timing: the first bit of a block reaches scan_in two clocks after
// the in_valid cycle that completed its codeword. The pairing of decoder
// and serializer follows the scheme; choosing the decoder by a parameter is
// this design's own.
module shd_chain
  import shd_pkg::*;
#(
  parameter int unsigned              B         = DEF_B,
  parameter int unsigned              N         = DEF_N,
  parameter int unsigned              MAX_CL    = DEF_MAX_CL,
  parameter logic [N-1:0][MAX_CL-1:0] CODE_BITS = DEF_CODE_BITS,
  parameter logic [N-1:0][CL_W-1:0]   CODE_LEN  = DEF_CODE_LEN,
  parameter logic [N-1:0][B-1:0]      PATTERN   = DEF_PATTERN,
  parameter bit                       USE_RAM   = 1'b0,
  parameter int unsigned              A         = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_bit,
  input  logic         tbl_we,
  input  logic [A-1:0] tbl_waddr,
  input  logic [B-1:0] tbl_wdata,
  output logic         scan_en,
  output logic         scan_in,
  output logic         cw_done,
  output logic         code_error,
  output logic         overrun
);

  logic         par_load, ser_load, ser_bit;
  logic [B-1:0] par_data;

  if (USE_RAM) begin : g_ram
    sh_ram_decoder #(.B(B), .A(A)) u_dec (
      .clk, .rst_n, .in_valid, .in_bit,
      .tbl_we, .tbl_waddr, .tbl_wdata,
      .par_load, .par_data, .ser_load, .ser_bit, .cw_done
    );
    assign code_error = 1'b0;   // every flag+A-bit sequence is a codeword
  end else begin : g_fsm
    sh_fsm_decoder #(
      .B(B), .N(N), .MAX_CL(MAX_CL),
      .CODE_BITS(CODE_BITS), .CODE_LEN(CODE_LEN), .PATTERN(PATTERN)
    ) u_dec (
      .clk, .rst_n, .in_valid, .in_bit,
      .par_load, .par_data, .ser_load, .ser_bit, .cw_done, .code_error
    );
  end

  shd_serializer #(.B(B)) u_ser (
    .clk, .rst_n, .par_load, .par_data, .ser_load, .ser_bit,
    .scan_en, .scan_in, .overrun
  );

endmodule
