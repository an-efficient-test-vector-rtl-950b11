// shd_serializer -- b-bit buffer between the decoder and the scan chain.
//
// The decoder hands over either a whole decoded block (par_load/par_data)
// or a single bit of an uncoded block (ser_load/ser_bit). The serializer
// shifts what it holds into the scan chain, most significant bit first, one
// bit per clock of the fast scan clock, for as long as it holds bits.
// scan_en is the enable of the scan clock; while it is low the chain and
// this register hold still, which is how the decoder gates the fast clock.
//
// The register is filled from the head: cnt bits wait in sreg[B-1 -: cnt].
// A parallel load fills all B places. A serial load puts its bit in the
// first free place behind the bits still waiting, so an uncoded bit may
// arrive while the previous decoded block is still being shifted out; it
// follows that block into the chain. Since a bit leaves every clock and at
// most one arrives per clock, a serial load always finds room.
//
// Timing: scan_en/scan_in come from registers, so the first scan shift of a
// load happens in the clock after the load. A parallel load is accepted in
// the clock of the last shift of the previous bits, so blocks can follow
// each other without a gap. A parallel load that arrives while more than
// one bit is still waiting would destroy data: it sets the sticky overrun
// flag. The code is chosen so that this cannot happen: every codeword is at
// least b * f_T / f_sys bits long, which leaves B scan clocks between two
// loads of a block.
//
// Own choices: the queueing of serial bits behind a block, the overrun
// flag, and gating the scan clock by an enable.
module shd_serializer
  import shd_pkg::*;
#(
  parameter int unsigned B = DEF_B
) (
  input  logic         clk,       // fast scan (system) clock
  input  logic         rst_n,
  input  logic         par_load,  // load a decoded block
  input  logic [B-1:0] par_data,
  input  logic         ser_load,  // append one uncoded bit
  input  logic         ser_bit,
  output logic         scan_en,   // scan chain shifts this cycle
  output logic         scan_in,   // bit entering the scan chain
  output logic         overrun    // sticky: a block came too early
);

  localparam int unsigned CW = $clog2(B + 1);

  logic [B-1:0]  sreg, sreg_sh, sreg_nxt;
  logic [CW-1:0] cnt, cnt_sh, cnt_nxt;

  assign scan_en = (cnt != '0);
  assign scan_in = sreg[B-1];

  always_comb begin
    // this clock's scan shift
    sreg_sh = scan_en ? (sreg << 1) : sreg;
    cnt_sh  = scan_en ? (cnt - CW'(1)) : cnt;
    sreg_nxt = sreg_sh;
    cnt_nxt  = cnt_sh;
    if (par_load) begin
      sreg_nxt = par_data;
      cnt_nxt  = CW'(B);
    end else if (ser_load) begin
      // cnt_sh <= B-1 here, so the place exists
      sreg_nxt[(B - 1) - int'(cnt_sh)] = ser_bit;
      cnt_nxt = cnt_sh + CW'(1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg    <= '0;
      cnt     <= '0;
      overrun <= 1'b0;
    end else begin
      sreg <= sreg_nxt;
      cnt  <= cnt_nxt;
      if (par_load && cnt_sh != '0)
        overrun <= 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(par_load && ser_load))
    else $error("shd_serializer: parallel and serial load together");

endmodule
