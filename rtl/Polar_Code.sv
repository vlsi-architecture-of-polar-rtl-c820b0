// Polar_Code: end-to-end (32,16) polar link, data in to data out.
//
//   enc_in[15:0] -> t1 encoder_32bit -> enc_out[31:0]
//                -> t2 channel       -> dec_in[287:0]  (32 x 9-bit samples)
//                -> t3 decoder_32bit -> dec_out[15:0]
//
// The three blocks, their instance names and the net names follow the source
// design. The channel is noise-free, so dec_out equals enc_in for every input;
// the decoder's error correction is exercised by its own testbench, which
// perturbs the samples. Timing: entirely combinational, no clock or reset.
module Polar_Code
  import polar_pkg::*;
(
  input  logic [K-1:0] enc_in,
  output logic [K-1:0] dec_out
);

  logic [N-1:0]       enc_out;
  logic [N*LLR_W-1:0] dec_in;

  encoder_32bit t1 (.in(enc_in),   .out(enc_out));
  channel       t2 (.enc_out(enc_out), .dec_in(dec_in));
  decoder_32bit t3 (.in(dec_in),   .dec_out(dec_out));

endmodule
