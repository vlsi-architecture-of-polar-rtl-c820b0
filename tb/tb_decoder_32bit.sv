// tb_decoder_32bit: self-checking test of the combinational SC decoder.
//
// The reference decoder here is an independent, sequential formulation of SC
// decoding: one leaf per loop step, keeping an LLR vector per tree level and
// the partial sums of finished left subtrees, in plain integer arithmetic with
// the same min-sum f and the g saturation at +-255. Checks:
//   * the 288-bit sample word of the source design decodes to 0xE9E0, the data
//     word whose codeword is 0x96009600 under this design's bit order;
//   * every data word, sent noise-free as +-1 samples, decodes to itself;
//   * random noisy sample words (signal +-A plus uniform noise, so some samples
//     carry the wrong sign) match the reference, and the number of frames the
//     decoder corrects (right data although at least one sample had the wrong
//     sign) must be non-zero;
//   * large amplitudes that drive the g saturation match the reference.
module tb_decoder_32bit;

  localparam int INFO [16] = '{7, 11, 13, 14, 15, 19, 21, 22, 23,
                               25, 26, 27, 28, 29, 30, 31};

  logic [287:0] din;
  logic [15:0]  dout;
  int checks = 0;
  int failures = 0;
  int corrected = 0;
  int saturated = 0;

  decoder_32bit dut (.in(din), .dec_out(dout));

  function automatic logic [31:0] encode(logic [15:0] d);
    logic [31:0] u = '0;
    logic [31:0] x;
    for (int k = 0; k < 16; k++) u[INFO[k]] = d[k];
    for (int j = 0; j < 32; j++) begin
      x[j] = 1'b0;
      for (int i = 0; i < 32; i++)
        if ((i & j) == j) x[j] ^= u[i];
    end
    return x;
  endfunction

  function automatic int clip(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int fref(int a, int b);
    int ma = clip((a < 0) ? -a : a, 0, 255);
    int mb = clip((b < 0) ? -b : b, 0, 255);
    int m  = (ma < mb) ? ma : mb;
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction

  function automatic int gref(int a, int b, bit s);
    return clip(s ? b - a : b + a, -255, 255);
  endfunction

  int sample [32];

  // Sequential SC over sample[]; returns the 16 information bits.
  function automatic logic [15:0] ref_decode();
    int  alpha [6][32];
    bit  betal [6][32];
    bit  cur   [32];
    bit  uhat  [32];
    bit  frozen [32];
    logic [15:0] d;
    for (int i = 0; i < 32; i++) frozen[i] = 1'b1;
    for (int k = 0; k < 16; k++) frozen[INFO[k]] = 1'b0;
    for (int i = 0; i < 32; i++) alpha[5][i] = sample[i];
    for (int phi = 0; phi < 32; phi++) begin
      int start;
      if (phi == 0) begin
        start = 5;
      end else begin
        automatic int t = 0;
        while (((phi >> t) & 1) == 0) t++;
        for (int i = 0; i < (1 << t); i++)
          alpha[t][i] = gref(alpha[t+1][i], alpha[t+1][i + (1 << t)], betal[t][i]);
        start = t;
      end
      for (int dd = start; dd >= 1; dd--)
        for (int i = 0; i < (1 << (dd-1)); i++)
          alpha[dd-1][i] = fref(alpha[dd][i], alpha[dd][i + (1 << (dd-1))]);
      uhat[phi] = frozen[phi] ? 1'b0 : (alpha[0][0] < 0);
      // Fold finished right subtrees into their parents.
      cur[0] = uhat[phi];
      begin
        automatic int dl = 0;
        while (dl < 5 && ((phi >> dl) & 1) == 1) begin
          automatic int h = 1 << dl;
          for (int i = 0; i < h; i++) begin
            cur[i + h] = cur[i];
            cur[i]     = betal[dl][i] ^ cur[i];
          end
          dl++;
        end
        if (dl < 5)
          for (int i = 0; i < (1 << dl); i++) betal[dl][i] = cur[i];
      end
    end
    for (int k = 0; k < 16; k++) d[k] = uhat[INFO[k]];
    return d;
  endfunction

  task automatic apply();
    for (int i = 0; i < 32; i++) din[9*i +: 9] = 9'(sample[i]);
    #1;
  endtask

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 288'hff80403ff00ffffe01008040201008040201ff80403ff00ffffe01008040201008040201;
    #1;
    check("document sample word", dout, 16'hE9E0);

    for (int d = 0; d < 65536; d++) begin
      automatic logic [31:0] x = encode(16'(d));
      for (int i = 0; i < 32; i++) sample[i] = x[i] ? -1 : 1;
      apply();
      check("noise-free", dout, 16'(d));
    end

    for (int t = 0; t < 20000; t++) begin
      automatic logic [15:0] d = 16'($urandom);
      automatic logic [31:0] x = encode(d);
      automatic int amp = 1 + int'($urandom_range(0, 20));
      automatic int rng = amp + int'($urandom_range(0, 2 * amp));
      automatic bit wrong = 0;
      logic [15:0] r;
      for (int i = 0; i < 32; i++) begin
        sample[i] = clip((x[i] ? -amp : amp) + int'($urandom_range(0, 2 * rng)) - rng, -256, 255);
        if ((sample[i] < 0) != x[i] || sample[i] == 0) wrong = 1;
      end
      apply();
      r = ref_decode();
      check("noisy vs reference", dout, r);
      if (wrong && dout == d) corrected++;
    end

    for (int t = 0; t < 5000; t++) begin
      automatic logic [15:0] d = 16'($urandom);
      automatic logic [31:0] x = encode(d);
      for (int i = 0; i < 32; i++)
        sample[i] = clip((x[i] ? -180 : 180) + int'($urandom_range(0, 400)) - 200, -256, 255);
      apply();
      check("saturating vs reference", dout, ref_decode());
      if (dout == d) saturated++;
    end

    $display("corrected frames: %0d, large-amplitude frames decoded right: %0d", corrected, saturated);
    checks++;
    if (corrected == 0) begin
      failures++;
      $display("FAIL no frame with sign errors was corrected");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
