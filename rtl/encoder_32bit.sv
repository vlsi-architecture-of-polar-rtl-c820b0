// encoder_32bit: polar encoder for the (32,16) code, purely combinational.
//
// The 16 data bits are first spread over the information positions of a
// 32-bit vector u (frozen positions are 0, see polar_pkg). The codeword is
// x = u * F^(x5) over GF(2), with F = [[1,0],[1,1]], computed by the usual
// log2(N) = 5 stages of XOR butterflies: at stage s every pair (j, j+2^s)
// inside a block of 2^(s+1) becomes (x[j] ^ x[j+2^s], x[j+2^s]). Bit i of a
// vector is index i; no bit-reversal permutation is applied.
//
// Interface: in[K-1:0] data, out[N-1:0] codeword, valid after the
// combinational delay (5 XOR levels). The port names and the 16 -> 32 sizes
// follow the source design; the absence of a clock also follows it (its block
// has only data pins). The information set and the data-to-position order are
// this design's choices.
module encoder_32bit
  import polar_pkg::*;
#(
  parameter int unsigned  CN    = N,
  parameter int unsigned  CK    = K,
  parameter logic [CN-1:0] CMASK = INFO_MASK
) (
  input  logic [CK-1:0] in,
  output logic [CN-1:0] out
);

  localparam int unsigned STAGES = $clog2(CN);

  logic [CN-1:0] u;

  always_comb begin
    u = '0;
    begin
      int unsigned k;
      k = 0;
      for (int unsigned i = 0; i < CN; i++) begin
        if (CMASK[i]) begin
          if (k < CK) u[i] = in[k];
          k++;
        end
      end
    end
  end

  // stage[0] = u, stage[STAGES] = codeword.
  logic [CN-1:0] stage [STAGES+1];

  assign stage[0] = u;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    for (genvar j = 0; j < CN; j++) begin : g_bit
      if ((j % (2 << s)) < (1 << s)) begin : g_top
        assign stage[s+1][j] = stage[s][j] ^ stage[s][j + (1 << s)];
      end else begin : g_pass
        assign stage[s+1][j] = stage[s][j];
      end
    end
  end

  assign out = stage[STAGES];

endmodule
