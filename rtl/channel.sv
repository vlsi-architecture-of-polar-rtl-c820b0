// channel: BPSK mapper between the polar encoder and decoder.
//
// Each of the N coded bits becomes one LLR_W-bit two's-complement sample:
// bit 0 -> +1 (9'h001), bit 1 -> -1 (9'h1FF). Sample i, for coded bit i, sits
// in dec_in[LLR_W*i +: LLR_W], so coded bit 31 lands in dec_in[287:279].
// The result is exactly the noise-free channel of the source design: for the
// codeword 0x96009600 it produces the 288-bit word
// ff80403ff00ffffe01008040201008040201 repeated twice. No noise is added in
// hardware; testbenches perturb the decoder input themselves.
//
// Interface: enc_out[N-1:0] in, dec_in[N*LLR_W-1:0] out, combinational.
module channel
  import polar_pkg::*;
#(
  parameter int unsigned CN = N
) (
  input  logic [CN-1:0]       enc_out,
  output logic [CN*LLR_W-1:0] dec_in
);

  for (genvar i = 0; i < CN; i++) begin : g_map
    assign dec_in[LLR_W*i +: LLR_W] = enc_out[i] ? llr_t'(-1) : llr_t'(1);
  end

endmodule
