// sc_node: one node of a fully unrolled successive-cancellation (SC) decoding
// tree, instantiated recursively; the root for the (32,16) code has NN = 32.
//
// A node of size NN receives NN channel-domain LLRs (positive = bit 0) and
// returns the NN bit decisions u_hat of its leaves plus their re-encoding
// x_hat (the partial sums its parent needs). With H = NN/2:
//   left child  LLRs : f(llr[i], llr[i+H])               i < H
//   right child LLRs : g(llr[i], llr[i+H], x_left[i])     i < H
//   x_hat           : {x_right, x_left ^ x_right}
// so the right child waits for the left child's decisions, exactly the
// sequential order of SC decoding, but in combinational logic. A leaf decides
// 1 when its LLR is negative, and always 0 when it is frozen (MASK bit 0).
// The recursion mirrors the encoder butterfly x = u * F^(xn) without
// bit-reversal, so x_hat of the root is the codeword of the decided u_hat.
//
// Timing: combinational; the longest path crosses every leaf in order.
//
// Lint note: linting this module on its own as the top level makes the
// linter report the child-result nets (u_l, u_r, x_l, x_r) as undriven and
// llr_l/llr_r as unused, because a top module that instantiates itself is not
// expanded there. Linted under decoder_32bit, where the whole tree is
// elaborated, these warnings do not appear, and synthesis of this module on
// its own yields the full tree.
module sc_node
  import polar_pkg::*;
#(
  parameter int unsigned    NN   = 32,
  parameter logic [NN-1:0]  MASK = INFO_MASK
) (
  input  llr_t           llr   [NN],
  output logic [NN-1:0]  u_hat,
  output logic [NN-1:0]  x_hat
);

  if (NN == 1) begin : g_leaf
    assign u_hat[0] = MASK[0] ? llr[0][LLR_W-1] : 1'b0;
    assign x_hat    = u_hat;
  end else begin : g_node
    localparam int unsigned H = NN / 2;

    llr_t          llr_l [H];
    llr_t          llr_r [H];
    logic [H-1:0]  u_l, u_r, x_l, x_r;

    always_comb begin
      for (int unsigned i = 0; i < H; i++) begin
        llr_l[i] = f_minsum(llr[i], llr[i+H]);
      end
    end

    sc_node #(.NN(H), .MASK(MASK[H-1:0])) u_left (
      .llr(llr_l), .u_hat(u_l), .x_hat(x_l)
    );

    always_comb begin
      for (int unsigned i = 0; i < H; i++) begin
        llr_r[i] = g_sat(llr[i], llr[i+H], x_l[i]);
      end
    end

    sc_node #(.NN(H), .MASK(MASK[NN-1:H])) u_right (
      .llr(llr_r), .u_hat(u_r), .x_hat(x_r)
    );

    assign u_hat = {u_r, u_l};
    assign x_hat = {x_r, x_l ^ x_r};
  end

endmodule
