// tb_channel: self-checking test of the BPSK channel mapper.
//
// Checks the exact vector of the source design (codeword 0x96009600 gives a
// fixed 288-bit sample word), then random codewords against a per-sample
// rule: sample i must be 9'h001 for a 0 and 9'h1FF for a 1.
module tb_channel;

  logic [31:0]  enc_out;
  logic [287:0] dec_in;
  int checks = 0;
  int failures = 0;

  channel dut (.enc_out(enc_out), .dec_in(dec_in));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enc_out = 32'b10010110000000001001011000000000; #1;
    checks++;
    if (dec_in !== 288'hff80403ff00ffffe01008040201008040201ff80403ff00ffffe01008040201008040201) begin
      failures++;
      $display("FAIL document vector: %h", dec_in);
    end

    for (int t = 0; t < 2000; t++) begin
      enc_out = $urandom; #1;
      for (int i = 0; i < 32; i++) begin
        checks++;
        if (dec_in[9*i +: 9] !== (enc_out[i] ? 9'h1FF : 9'h001)) begin
          failures++;
          if (failures < 10) $display("FAIL sample %0d of %h: %h", i, enc_out, dec_in[9*i +: 9]);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
