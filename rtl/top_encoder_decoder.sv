// top_encoder_decoder: convolutional encoder and Viterbi decoder end to end.
//
// input_data bits enter the rate-1/2 encoder (one bit per clock while
// input_ready is high); each code symbol passes a channel model point,
// where chan_err is XORed onto it (a 1 flips that code bit, as noise on a
// real link would), and goes on to the Viterbi decoder, which returns the
// corrected bits on out/out_valid. The clean encoder output is brought out
// on encoded/encoded_valid/encoded_ready for observation; chan_err applies
// to the symbol shown there in the cycle it is accepted
// (encoded_valid && encoded_ready). input_last marks the final bit of a
// message; out_last marks the matching decoded bit.
//
// Defaults: K = 3 with generators 111/101, trellis length 32 (survivor
// memory 64 words x 4 states), 4-bit path metrics. reset is synchronous and
// active high. An undisturbed bit comes out after its block is complete and
// traced (see viterbi_decoder for the latency).
// The top name and the clk/reset/input_data/out ports follow the source
// design; the handshakes, chan_err and the encoded_* ports are additions.
module top_encoder_decoder
  import viterbi_pkg::*;
#(
  parameter int unsigned K   = K_DEFAULT,
  parameter int unsigned G1  = G1_DEFAULT,
  parameter int unsigned G0  = G0_DEFAULT,
  parameter int unsigned TL  = 32,
  parameter int unsigned PMW = 4
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       input_data,
  input  logic       input_valid,
  input  logic       input_last,
  output logic       input_ready,
  input  logic [1:0] chan_err,
  output logic [1:0] encoded,
  output logic       encoded_valid,
  output logic       encoded_ready,
  output logic       out,
  output logic       out_valid,
  output logic       out_last
);

  logic enc_last;

  conv_encoder #(.K(K), .G1(G1), .G0(G0)) u_encoder (
    .clk       (clk),
    .reset     (reset),
    .in_bit    (input_data),
    .in_valid  (input_valid),
    .in_last   (input_last),
    .in_ready  (input_ready),
    .sym       (encoded),
    .sym_valid (encoded_valid),
    .sym_last  (enc_last),
    .sym_ready (encoded_ready)
  );

  viterbi_decoder #(.K(K), .G1(G1), .G0(G0), .TL(TL), .PMW(PMW)) u_decoder (
    .clk       (clk),
    .reset     (reset),
    .in_sym    (encoded ^ chan_err),
    .in_valid  (encoded_valid),
    .in_last   (enc_last),
    .in_ready  (encoded_ready),
    .out_bit   (out),
    .out_valid (out_valid),
    .out_last  (out_last)
  );

endmodule
