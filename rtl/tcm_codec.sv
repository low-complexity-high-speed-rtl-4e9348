// tcm_codec: the complete 4-D 8PSK TCM system for Rm = 11/12, encoder and
// decoder side by side, each with its own ports. The encoder turns 11
// information bits per clock into four quantised 8PSK samples; the decoder
// turns four received (noisy, possibly phase-rotated) samples per clock back
// into 11 information bits. Connect enc_i/enc_q to dec_i/dec_q through a
// channel for a loop-back test.
module tcm_codec
  import tcm_pkg::*;
#(
  parameter int AMP       = 40,
  parameter int SMU_DEPTH = 48
) (
  input  logic  clk,
  input  logic  rst_n,
  // encoder side
  input  logic  enc_in_valid,
  input  info_t enc_in_info,
  output logic  enc_out_valid,
  output path_t enc_out_z,
  output iq_t   enc_out_i [4],
  output iq_t   enc_out_q [4],
  // decoder side
  input  logic  dec_in_valid,
  input  iq_t   dec_in_i [4],
  input  iq_t   dec_in_q [4],
  output logic  dec_out_valid,
  output info_t dec_out_info
);
  tcm_encoder #(.AMP(AMP)) u_enc (
    .clk, .rst_n, .in_valid(enc_in_valid), .info(enc_in_info),
    .out_valid(enc_out_valid), .out_z(enc_out_z), .out_i(enc_out_i), .out_q(enc_out_q)
  );

  tcm_decoder #(.SMU_DEPTH(SMU_DEPTH)) u_dec (
    .clk, .rst_n, .in_valid(dec_in_valid), .in_i(dec_in_i), .in_q(dec_in_q),
    .out_valid(dec_out_valid), .out_info(dec_out_info)
  );
endmodule
