// decoder_32bit: successive-cancellation (SC) decoder for the (32,16) polar
// code, fully unrolled in combinational logic.
//
// The 288-bit input holds 32 samples of 9 bits, sample i (for codeword bit i)
// in in[9*i +: 9], two's complement, positive meaning bit 0; this is the
// format the channel block produces. The samples feed the root of a recursive
// SC tree (sc_node) that uses min-sum f, saturating g and hard decisions with
// frozen bits forced to 0. The 16 decisions at the information positions,
// taken in ascending index order, form dec_out.
//
// The sizes (288 in, 16 out), the port names and the absence of a clock follow
// the source design. The choice of plain SC with min-sum among the SC, SCL and
// BP decoders it mentions, the information set and the saturation are this
// design's own.
//
// Interface: in[N*LLR_W-1:0], dec_out[K-1:0]. Timing: combinational.
//
// The root's x_hat (re-encoded decisions) has no consumer above the root and
// stays unconnected on purpose; lint reports it as unused.
module decoder_32bit
  import polar_pkg::*;
#(
  parameter int unsigned   CN    = N,
  parameter int unsigned   CK    = K,
  parameter logic [CN-1:0] CMASK = INFO_MASK
) (
  input  logic [CN*LLR_W-1:0] in,
  output logic [CK-1:0]       dec_out
);

  llr_t         llr [CN];
  logic [CN-1:0] u_hat;
  logic [CN-1:0] x_hat;

  always_comb begin
    for (int unsigned i = 0; i < CN; i++) begin
      llr[i] = llr_t'(in[LLR_W*i +: LLR_W]);
    end
  end

  sc_node #(.NN(CN), .MASK(CMASK)) u_root (
    .llr(llr), .u_hat(u_hat), .x_hat(x_hat)
  );

  // Gather the information bits in ascending index order.
  always_comb begin
    int unsigned k;
    dec_out = '0;
    k = 0;
    for (int unsigned i = 0; i < CN; i++) begin
      if (CMASK[i]) begin
        if (k < CK) dec_out[k] = u_hat[i];
        k++;
      end
    end
  end

endmodule
