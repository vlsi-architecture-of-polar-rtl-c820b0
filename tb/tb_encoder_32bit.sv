// tb_encoder_32bit: self-checking test of the (32,16) polar encoder.
//
// The reference codeword is computed from the generator-matrix definition
// rather than the butterfly: x[j] is the XOR of u[i] over every i whose
// binary digits contain those of j (row i of F^(x5) has a 1 in column j
// exactly when (i & j) == j). The information positions are listed here
// literally. Checks: all 65536 data words against the reference; the
// codeword 0x96009600 of the source design's waveforms (data 0xE9E0 under
// this design's bit order); and that re-transforming any codeword gives zeros
// on every frozen position (the transform is its own inverse).
module tb_encoder_32bit;

  localparam int INFO [16] = '{7, 11, 13, 14, 15, 19, 21, 22, 23,
                               25, 26, 27, 28, 29, 30, 31};

  logic [15:0] din;
  logic [31:0] dout;
  int checks = 0;
  int failures = 0;

  encoder_32bit dut (.in(din), .out(dout));

  function automatic logic [31:0] transform(logic [31:0] u);
    logic [31:0] x;
    for (int j = 0; j < 32; j++) begin
      x[j] = 1'b0;
      for (int i = 0; i < 32; i++)
        if ((i & j) == j) x[j] ^= u[i];
    end
    return x;
  endfunction

  function automatic logic [31:0] ref_encode(logic [15:0] d);
    logic [31:0] u = '0;
    for (int k = 0; k < 16; k++) u[INFO[k]] = d[k];
    return transform(u);
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
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
    logic [31:0] frozen_mask;
    frozen_mask = '1;
    for (int k = 0; k < 16; k++) frozen_mask[INFO[k]] = 1'b0;

    din = 16'hE9E0; #1;
    check("document codeword", dout, 32'h9600_9600);

    for (int d = 0; d < 65536; d++) begin
      din = 16'(d); #1;
      check("exhaustive", dout, ref_encode(din));
      check("frozen zero", transform(dout) & frozen_mask, 32'h0);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
