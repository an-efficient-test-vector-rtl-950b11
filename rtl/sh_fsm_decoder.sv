// sh_fsm_decoder -- finite-state decoder for a selective Huffman code.
//
// The decoder receives the compressed stream one bit per tester cycle
// (in_valid marks a cycle that carries a bit) and rebuilds the b-bit blocks.
// The first bit of every codeword is a flag:
//   * flag 0: the next B bits are the block itself. Each of them is handed to
//     the serializer as it arrives (ser_load/ser_bit), so an uncoded block
//     costs B+1 tester cycles and no storage in the decoder.
//   * flag 1: the following bits are a prefix-free Huffman code of one of the
//     N most frequent blocks. The decoder walks the code tree one bit at a
//     time; on reaching a leaf it hands the whole block to the serializer in
//     parallel (par_load/par_data).
// The tree is given by the CODE_BITS/CODE_LEN/PATTERN tables (see shd_pkg).
// The tree walk is kept as a shift register of the bits seen so far plus
// their count, compared against every table entry; the states this amounts
// to are the N-1 inner nodes of the tree, the flag state and the B raw-bit
// states, i.e. the n+b state machine of the scheme, for any code the tables
// describe. The tables are parameters, so each code is synthesized into its
// own fixed decoder, as in the scheme.
//
// Timing: all outputs are registered. par_load, ser_load and cw_done are
// one-cycle pulses in the cycle after the in_valid cycle that completed
// them. A bit sequence that is no codeword (only possible with tables that
// do not form a complete tree) sets the sticky code_error flag and the
// decoder returns to the flag state.
//
// Own choices, not fixed by the scheme: single clock with a bit-valid
// strobe instead of a separate tester clock, asynchronous active-low reset,
// the polarity 1 = coded follows the scheme.
module sh_fsm_decoder
  import shd_pkg::*;
#(
  parameter int unsigned                     B         = DEF_B,
  parameter int unsigned                     N         = DEF_N,
  parameter int unsigned                     MAX_CL    = DEF_MAX_CL,
  parameter logic [N-1:0][MAX_CL-1:0]        CODE_BITS = DEF_CODE_BITS,
  parameter logic [N-1:0][CL_W-1:0]          CODE_LEN  = DEF_CODE_LEN,
  parameter logic [N-1:0][B-1:0]             PATTERN   = DEF_PATTERN
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,   // a compressed bit is present this cycle
  input  logic         in_bit,     // the compressed bit
  output logic         par_load,   // load par_data into the serializer
  output logic [B-1:0] par_data,   // decoded block, MSB enters scan first
  output logic         ser_load,   // load ser_bit into the serializer
  output logic         ser_bit,    // one bit of an uncoded block
  output logic         cw_done,    // a codeword has just been completed
  output logic         code_error  // sticky: received bits match no codeword
);

  localparam int unsigned LW = $clog2(MAX_CL + 1);
  localparam int unsigned RW = $clog2(B + 1);

  dec_state_e         state;
  logic [MAX_CL-1:0]  pfx;       // Huffman bits received so far
  logic [LW-1:0]      plen;      // how many
  logic [RW-1:0]      rcnt;      // raw bits passed so far

  logic [MAX_CL-1:0]  nxt_pfx;
  logic [CL_W-1:0]    nxt_len;
  logic               hit;
  logic [B-1:0]       hit_pat;

  // Tree step: append the new bit and look for a leaf of that depth.
  always_comb begin
    nxt_pfx = (pfx << 1) | MAX_CL'(in_bit);
    nxt_len = CL_W'(plen) + CL_W'(1);
    hit     = 1'b0;
    hit_pat = '0;
    for (int i = 0; i < int'(N); i++) begin
      if (CODE_LEN[i] == nxt_len && CODE_BITS[i] == nxt_pfx) begin
        hit     = 1'b1;
        hit_pat = PATTERN[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= DEC_FLAG;
      pfx        <= '0;
      plen       <= '0;
      rcnt       <= '0;
      par_load   <= 1'b0;
      par_data   <= '0;
      ser_load   <= 1'b0;
      ser_bit    <= 1'b0;
      cw_done    <= 1'b0;
      code_error <= 1'b0;
    end else begin
      par_load <= 1'b0;
      ser_load <= 1'b0;
      cw_done  <= 1'b0;
      if (in_valid) begin
        unique case (state)
          DEC_FLAG: begin
            pfx  <= '0;
            plen <= '0;
            rcnt <= '0;
            state <= in_bit ? DEC_CODED : DEC_RAW;
          end
          DEC_CODED: begin
            if (hit) begin
              par_load <= 1'b1;
              par_data <= hit_pat;
              cw_done  <= 1'b1;
              state    <= DEC_FLAG;
            end else if (nxt_len >= CL_W'(MAX_CL)) begin
              code_error <= 1'b1;
              state      <= DEC_FLAG;
            end else begin
              pfx  <= nxt_pfx;
              plen <= plen + LW'(1);
            end
          end
          DEC_RAW: begin
            ser_load <= 1'b1;
            ser_bit  <= in_bit;
            rcnt     <= rcnt + RW'(1);
            if (rcnt == RW'(B - 1)) begin
              cw_done <= 1'b1;
              state   <= DEC_FLAG;
            end
          end
          default: state <= DEC_FLAG;
        endcase
      end
    end
  end

  // The tables must form a prefix-free code with N >= 2 entries (a Huffman
  // tree with one leaf would have a code of zero bits).
  if (N < 2) begin : g_bad_n
    $error("sh_fsm_decoder: at least two coded blocks are needed");
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(par_load && ser_load))
    else $error("sh_fsm_decoder: parallel and serial load together");

endmodule
