// online_ipu: online inner product unit (datapath part).
//
// Computes p = 2^-L * sum_{k=1..K} A_k * B_k for K pairs of n-digit
// signed-digit fractions, most significant digit first, with L = clog2(K)
// so that p stays inside (-1, 1). The K multiplications are merged: in each
// clock one digit plane of the activations (digit i of every A_k) and one
// digit plane of the weights (digit j of every B_k) are multiplied digit by
// digit and the K products are reduced by a popcount to a single term
// P(i,j) in [-K, K]. From there the unit works exactly like the online
// multiplier: the term enters the partial product row register, and once per
// row the row sum enters the residual, from which a result digit is
// selected. Registers are shared by all K products, so the area grows
// roughly with the popcount only.
//
// The sequence is supplied by online_ctrl, which may drive several units in
// lock-step (the same micro-instruction and plane addresses for all).
// Interface: a_plane/b_plane must hold the planes named by the controller's
// a_idx/b_idx in the same clock. en = 0 freezes the unit (early
// termination). digit/digit_valid: one result digit per digit_valid pulse,
// n in all, the first after row 3 of the program. Result accuracy:
// |2^-L * sum A_k B_k - sum p_j 2^-j| <= 3/4 * 2^-n.
module online_ipu
  import msdf_pkg::*;
#(
  parameter int N = 8,
  parameter int K = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  uop_t         uop,
  input  bsd_t [K-1:0] a_plane,
  input  bsd_t [K-1:0] b_plane,
  output bsd_t         digit,
  output logic         digit_valid
);

  localparam int L  = $clog2(K);
  localparam int PW = $clog2(K + 1) + 1;

  logic signed [PW-1:0] p_term;

  bsd_popcount #(.K(K), .PW(PW)) u_pop (
    .a_plane(a_plane), .b_plane(b_plane), .p_term(p_term)
  );

  online_datapath #(.N(N), .L(L), .PW(PW)) u_dp (
    .clk(clk), .rst_n(rst_n), .en(en), .uop(uop), .p_term(p_term),
    .digit(digit), .digit_valid(digit_valid)
  );

endmodule
