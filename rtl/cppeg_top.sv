// cppeg_top - the two designs side by side: the rate-15/16 CP-PEG LDPC
// decoder and the Box-Muller AWGN noise generator used to measure its
// error rate. They share only clock and reset; each keeps its own ports,
// so an emulation set-up (BPSK mapping, LLR scaling, error counting) can
// join them outside.
//
// Decoder ports: see ldpc_decoder (512 six-bit LLRs of one group per
// transfer, 2048 hard decisions per codeword, 20 cycles per codeword).
// Noise ports: see awgn_core (two Q(16,12) samples per enabled cycle,
// six-stage pipeline).
module cppeg_top
  import ldpc_pkg::*;
#(
  parameter int P    = 32,
  parameter int ITER = 4
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // LDPC decoder
  input  logic                             dec_in_valid,
  output logic                             dec_in_ready,
  input  logic signed [SLOTS*P-1:0][W-1:0] dec_llr,
  output logic                             dec_out_valid,
  output logic [G*SLOTS*P-1:0]             dec_bits,
  // AWGN core
  input  logic                             awgn_seed_load,
  input  logic [127:0]                     awgn_seed_u1,
  input  logic [127:0]                     awgn_seed_u2,
  input  logic [15:0]                      awgn_sigma,
  input  logic                             awgn_en,
  output logic                             awgn_valid,
  output logic signed [15:0]               awgn_x,
  output logic signed [15:0]               awgn_y
);

  ldpc_decoder #(.P(P), .ITER(ITER)) u_dec (
    .clk(clk), .rst_n(rst_n), .in_valid(dec_in_valid), .in_ready(dec_in_ready),
    .llr_in(dec_llr), .out_valid(dec_out_valid), .out_bits(dec_bits)
  );

  awgn_core u_awgn (
    .clk(clk), .rst_n(rst_n), .seed_load(awgn_seed_load), .seed_u1(awgn_seed_u1),
    .seed_u2(awgn_seed_u2), .sigma(awgn_sigma), .en(awgn_en),
    .out_valid(awgn_valid), .noise_x(awgn_x), .noise_y(awgn_y)
  );

endmodule
