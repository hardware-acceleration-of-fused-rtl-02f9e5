// bsd_popcount: partial-product generator of the online inner product unit.
//
// For one digit position i of every activation A_k and one digit position j
// of every weight B_k it forms the K single-digit products A(k,i)*B(k,j),
// each in {-1, 0, +1}, and sums them: P = #(+1 products) - #(-1 products).
// Merging the K multiplications this way lets one shared accumulator serve
// all of them (sum over k moved innermost in the triple sum over i, j, k).
// A digit product is +1 when both digits are non-zero with equal sign and -1
// when they are non-zero with opposite signs. The two counts are plain
// popcounts of K-bit vectors. Purely combinational; P lies in [-K, K].
module bsd_popcount
  import msdf_pkg::*;
#(
  parameter int K  = 8,
  parameter int PW = $clog2(K + 1) + 1   // width of the signed result
) (
  input  bsd_t [K-1:0]         a_plane,  // digit i of A_1..A_K
  input  bsd_t [K-1:0]         b_plane,  // digit j of B_1..B_K
  output logic signed [PW-1:0] p_term
);

  localparam int CW = $clog2(K + 1);

  logic [K-1:0]  prod_pos, prod_neg;
  logic [CW-1:0] n_pos, n_neg;

  always_comb begin
    for (int k = 0; k < K; k++) begin
      prod_pos[k] = (bsd_is_pos(a_plane[k]) & bsd_is_pos(b_plane[k]))
                  | (bsd_is_neg(a_plane[k]) & bsd_is_neg(b_plane[k]));
      prod_neg[k] = (bsd_is_pos(a_plane[k]) & bsd_is_neg(b_plane[k]))
                  | (bsd_is_neg(a_plane[k]) & bsd_is_pos(b_plane[k]));
    end
    n_pos = '0;
    n_neg = '0;
    for (int k = 0; k < K; k++) begin
      n_pos = n_pos + CW'(prod_pos[k]);
      n_neg = n_neg + CW'(prod_neg[k]);
    end
    p_term = $signed({1'b0, n_pos}) - $signed({1'b0, n_neg});
  end

endmodule
