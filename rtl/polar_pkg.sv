// polar_pkg: constants, types and arithmetic shared by the (32,16) polar
// encoder, the BPSK channel mapper and the successive-cancellation decoder.
//
// Code: block length N = 32, K = 16 data bits, so rate 1/2. Each coded bit
// travels to the decoder as a 9-bit two's-complement sample (32 x 9 = 288
// bits), positive meaning "bit 0". These three sizes follow the source design.
//
// The information set is this design's choice: the 16 most reliable indices of
// the 5G NR polar reliability sequence restricted to N = 32,
//   {7,11,13,14,15,19,21,22,23,25,26,27,28,29,30,31},
// written as INFO_MASK with bit i set when index i carries data. Frozen bits
// are 0. Data bit k occupies the k-th set bit of the mask counting from bit 0
// (the encoder and decoder do this mapping).
//
// f_minsum and g_sat are the two node operations of SC decoding:
//   f(a,b)   = sign(a) * sign(b) * min(|a|,|b|)      (min-sum approximation)
//   g(a,b,s) = b + a when s = 0, b - a when s = 1    (saturated to +-255)
package polar_pkg;

  localparam int unsigned N     = 32;
  localparam int unsigned K     = 16;
  localparam int unsigned LLR_W = 9;
  localparam logic [N-1:0] INFO_MASK = 32'hFEE8_E880;

  localparam int LLR_MAX = (1 <<< (LLR_W - 1)) - 1;   // +255

  typedef logic signed [LLR_W-1:0] llr_t;

  // Magnitude with the most negative code folded onto LLR_MAX.
  function automatic logic [LLR_W-1:0] llr_abs(llr_t a);
    logic [LLR_W-1:0] m;
    m = a[LLR_W-1] ? LLR_W'(-a) : LLR_W'(a);
    if (m > LLR_W'(LLR_MAX)) m = LLR_W'(LLR_MAX);
    return m;
  endfunction

  function automatic llr_t f_minsum(llr_t a, llr_t b);
    logic [LLR_W-1:0] ma, mb, m;
    ma = llr_abs(a);
    mb = llr_abs(b);
    m  = (ma < mb) ? ma : mb;
    return (a[LLR_W-1] ^ b[LLR_W-1]) ? llr_t'(-m) : llr_t'(m);
  endfunction

  function automatic llr_t g_sat(llr_t a, llr_t b, logic s);
    logic signed [LLR_W:0] sum;
    sum = s ? ((LLR_W+1)'(b) - (LLR_W+1)'(a)) : ((LLR_W+1)'(b) + (LLR_W+1)'(a));
    if (sum > (LLR_W+1)'(LLR_MAX))       return llr_t'(LLR_MAX);
    else if (sum < -(LLR_W+1)'(LLR_MAX)) return llr_t'(-LLR_MAX);
    else                                 return llr_t'(sum);
  endfunction

endpackage
