// shd_channel_dist -- shares one tester channel among NUM_CHAINS decoders.
//
// When the scan chains cannot be clocked faster than the tester, one tester
// channel feeds NUM_CHAINS scan chains, each with its own decoder. The
// channel rotates: bit k of the stream goes to decoder k mod NUM_CHAINS, so
// each decoder sees a bit every NUM_CHAINS tester cycles while its scan
// chain can shift every cycle. With two chains, decoder 0 takes the even
// bits and decoder 1 the odd bits, counted from reset.
//
// Interface: t_valid/t_bit is the tester channel; d_valid is one-hot (the
// decoder whose turn it is) and d_bit the bit, shared by all decoders.
// Timing: combinational from t_valid to d_valid; the phase counter advances
// on every t_valid. With NUM_CHAINS = 1 every bit goes to the one decoder.
// The rotation follows the scheme; the phase counter, its reset to chain 0
// and the one-hot form of the enables are this design's choices.
module shd_channel_dist #(
  parameter int unsigned NUM_CHAINS = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  t_valid,
  input  logic                  t_bit,
  output logic [NUM_CHAINS-1:0] d_valid,
  output logic                  d_bit
);

  localparam int unsigned PW = (NUM_CHAINS > 1) ? $clog2(NUM_CHAINS) : 1;

  logic [PW-1:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      phase <= '0;
    else if (t_valid)
      phase <= (phase == PW'(NUM_CHAINS - 1)) ? '0 : phase + PW'(1);
  end

  always_comb begin
    d_valid = '0;
    for (int i = 0; i < int'(NUM_CHAINS); i++)
      d_valid[i] = t_valid && (phase == PW'(i));
  end

  assign d_bit = t_bit;

endmodule
