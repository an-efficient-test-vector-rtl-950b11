// shd_top -- on-chip decompressor for selective-Huffman-coded scan test data.
//
// The tester stores the scan vectors compressed and sends them over one
// channel, one bit per tester cycle (t_valid marks the cycle, t_bit is the
// bit). The channel is shared round-robin among NUM_CHAINS scan chains
// (shd_channel_dist); each chain has its own decoder and serializer
// (shd_chain) driving that chain's scan input. All logic runs on clk, the
// scan clock:
//   * fast scan clock (NUM_CHAINS = 1, the default): clk is f_sys and the
//     tester's bits come every R = f_sys/f_T clocks;
//   * shared channel (NUM_CHAINS = n): clk is the tester clock, t_valid is
//     high every cycle and each decoder sees every n-th bit.
// Either way a decoder must see at most one bit per B/L_min scan clocks,
// where L_min is the shortest codeword, for the tester never to wait.
//
// Outputs per chain: scan_en (shift the chain this clock), scan_in (the
// bit), cw_done (a codeword was completed), code_error and overrun (sticky
// error flags, see shd_chain). tbl_* loads the decoding table of the chains
// selected by tbl_we when USE_RAM = 1; the ports are unused otherwise.
//
// Test responses are compacted on chip by a separate compactor (e.g. a
// MISR) and are outside this design, as is the core and its scan chains.
//
// The structure follows the scheme. Own choices: one clock domain with a
// bit-valid strobe, the error flags, and one set of code tables shared by
// all chains (each chain has its own RAM when USE_RAM = 1).
module shd_top
  import shd_pkg::*;
#(
  parameter int unsigned              B          = DEF_B,
  parameter int unsigned              N          = DEF_N,
  parameter int unsigned              MAX_CL     = DEF_MAX_CL,
  parameter logic [N-1:0][MAX_CL-1:0] CODE_BITS  = DEF_CODE_BITS,
  parameter logic [N-1:0][CL_W-1:0]   CODE_LEN   = DEF_CODE_LEN,
  parameter logic [N-1:0][B-1:0]      PATTERN    = DEF_PATTERN,
  parameter int unsigned              NUM_CHAINS = 1,
  parameter bit                       USE_RAM    = 1'b0,
  parameter int unsigned              A          = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  t_valid,
  input  logic                  t_bit,
  input  logic [NUM_CHAINS-1:0] tbl_we,
  input  logic [A-1:0]          tbl_waddr,
  input  logic [B-1:0]          tbl_wdata,
  output logic [NUM_CHAINS-1:0] scan_en,
  output logic [NUM_CHAINS-1:0] scan_in,
  output logic [NUM_CHAINS-1:0] cw_done,
  output logic [NUM_CHAINS-1:0] code_error,
  output logic [NUM_CHAINS-1:0] overrun
);

  logic [NUM_CHAINS-1:0] d_valid;
  logic                  d_bit;

  shd_channel_dist #(.NUM_CHAINS(NUM_CHAINS)) u_dist (
    .clk, .rst_n, .t_valid, .t_bit, .d_valid, .d_bit
  );

  for (genvar c = 0; c < int'(NUM_CHAINS); c++) begin : g_chain
    shd_chain #(
      .B(B), .N(N), .MAX_CL(MAX_CL),
      .CODE_BITS(CODE_BITS), .CODE_LEN(CODE_LEN), .PATTERN(PATTERN),
      .USE_RAM(USE_RAM), .A(A)
    ) u_chain (
      .clk, .rst_n,
      .in_valid   (d_valid[c]),
      .in_bit     (d_bit),
      .tbl_we     (tbl_we[c]),
      .tbl_waddr,
      .tbl_wdata,
      .scan_en    (scan_en[c]),
      .scan_in    (scan_in[c]),
      .cw_done    (cw_done[c]),
      .code_error (code_error[c]),
      .overrun    (overrun[c])
    );
  end

endmodule
