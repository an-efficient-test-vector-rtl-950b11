// sh_ram_decoder -- table-lookup decoder for the two-length variant of the
// selective code.
//
// Here every codeword has one of two lengths. A flag 0 is followed by the
// B-bit block itself (B+1 bits, passed bit by bit to the serializer exactly
// as in sh_fsm_decoder). A flag 1 is followed by an A-bit address into a
// 2^A x B table whose word is the decoded block (A+1 bits). With B = 8 and
// A = 4, the 16 most frequent of the 256 possible 8-bit blocks get 5-bit
// codewords and the other 240 get 9-bit codewords. The table is a RAM
// written through the tbl_* port, so one decoder serves any core: load the
// core's 2^A blocks before its test. Entries never written are not
// initialised.
//
// Timing: as sh_fsm_decoder. The table is read synchronously in the cycle
// that receives the last address bit; par_load and par_data appear one
// cycle later. A table write and a decode may overlap only if they do not
// touch the same word in the same cycle.
//
// Own choices: write port width and timing, no reset of the table.
module sh_ram_decoder
  import shd_pkg::*;
#(
  parameter int unsigned B = 8,
  parameter int unsigned A = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,   // a compressed bit is present this cycle
  input  logic         in_bit,
  input  logic         tbl_we,     // write one table word
  input  logic [A-1:0] tbl_waddr,
  input  logic [B-1:0] tbl_wdata,
  output logic         par_load,
  output logic [B-1:0] par_data,
  output logic         ser_load,
  output logic         ser_bit,
  output logic         cw_done
);

  localparam int unsigned AW = $clog2(A + 1);
  localparam int unsigned RW = $clog2(B + 1);

  logic [B-1:0] table_mem [2**A];

  dec_state_e    state;
  logic [A-1:0]  addr;
  logic [AW-1:0] acnt;
  logic [RW-1:0] rcnt;
  logic [A-1:0]  nxt_addr;

  assign nxt_addr = (addr << 1) | A'(in_bit);

  always_ff @(posedge clk) begin
    if (tbl_we)
      table_mem[tbl_waddr] <= tbl_wdata;
  end

  // Registered table read; par_data is held between loads.
  always_ff @(posedge clk) begin
    if (in_valid && state == DEC_CODED && acnt == AW'(A - 1))
      par_data <= table_mem[nxt_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= DEC_FLAG;
      addr     <= '0;
      acnt     <= '0;
      rcnt     <= '0;
      par_load <= 1'b0;
      ser_load <= 1'b0;
      ser_bit  <= 1'b0;
      cw_done  <= 1'b0;
    end else begin
      par_load <= 1'b0;
      ser_load <= 1'b0;
      cw_done  <= 1'b0;
      if (in_valid) begin
        unique case (state)
          DEC_FLAG: begin
            addr  <= '0;
            acnt  <= '0;
            rcnt  <= '0;
            state <= in_bit ? DEC_CODED : DEC_RAW;
          end
          DEC_CODED: begin
            addr <= nxt_addr;
            acnt <= acnt + AW'(1);
            if (acnt == AW'(A - 1)) begin
              par_load <= 1'b1;
              cw_done  <= 1'b1;
              state    <= DEC_FLAG;
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

endmodule
