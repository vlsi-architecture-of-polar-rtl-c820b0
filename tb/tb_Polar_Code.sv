// tb_Polar_Code: end-to-end test of the (32,16) polar link at its default
// sizes: encoder -> noise-free BPSK channel -> SC decoder.
//
// Drives the data words of the source design's waveform sequence
// (0000, aaaa, ff00, f0f0, ffff, 0007, 00ff, cccc) and then all 65536 data
// words. For each it checks dec_out == enc_in, and checks the internal nets
// against independent models: enc_out against the generator-matrix product
// and dec_in against the +-1 sample rule. It also checks the one complete
// channel vector the source design prints (codeword 0x96009600, reached from
// data 0xE9E0 under this design's bit order).
//
// Mechanisms counted, each must occur at least once: a frozen position of u
// being forced to 0 while the data word is non-zero (every frame), a codeword
// with both sample signs present, and the printed reference vector.
module tb_Polar_Code;

  localparam int INFO [16] = '{7, 11, 13, 14, 15, 19, 21, 22, 23,
                               25, 26, 27, 28, 29, 30, 31};
  localparam logic [15:0] FIG_SEQ [8] = '{16'h0000, 16'hAAAA, 16'hFF00, 16'hF0F0,
                                          16'hFFFF, 16'h0007, 16'h00FF, 16'hCCCC};

  logic [15:0] enc_in;
  logic [15:0] dec_out;
  int checks = 0;
  int failures = 0;
  int n_roundtrip = 0;
  int n_mixed = 0;
  int n_docvec = 0;

  Polar_Code dut (.enc_in(enc_in), .dec_out(dec_out));

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

  task automatic check(string what, logic [287:0] got, logic [287:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s (enc_in %h): got %h expected %h", what, enc_in, got, exp);
    end
  endtask

  task automatic one_frame(logic [15:0] d);
    logic [31:0]  x;
    logic [287:0] s;
    enc_in = d;
    #1;
    x = encode(d);
    for (int i = 0; i < 32; i++) s[9*i +: 9] = x[i] ? 9'h1FF : 9'h001;
    check("enc_out", 288'(dut.enc_out), 288'(x));
    check("dec_in", dut.dec_in, s);
    check("dec_out", 288'(dec_out), 288'(d));
    if (dec_out == d) n_roundtrip++;
    if (x != 32'h0 && x != 32'hFFFF_FFFF) n_mixed++;
    if (dut.dec_in == 288'hff80403ff00ffffe01008040201008040201ff80403ff00ffffe01008040201008040201)
      n_docvec++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (FIG_SEQ[i]) one_frame(FIG_SEQ[i]);
    one_frame(16'hE9E0);
    for (int d = 0; d < 65536; d++) one_frame(16'(d));

    $display("round trips %0d, mixed-sign codewords %0d, printed vector seen %0d",
             n_roundtrip, n_mixed, n_docvec);
    checks += 3;
    if (n_roundtrip == 0) begin failures++; $display("FAIL no round trip"); end
    if (n_mixed == 0)     begin failures++; $display("FAIL no mixed-sign codeword"); end
    if (n_docvec == 0)    begin failures++; $display("FAIL printed vector never produced"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
