// online_select: residual estimate and output-digit selection of the radix-2
// online multiplication recurrence.
//
// The residual v is held in carry-save form (sum, carry) as an integer scaled
// by 2^F, so bit F has weight 1. The estimate v_hat adds only the four bits
// F+1 .. F-2 of both vectors in a 4-bit carry-propagate adder, i.e. v is
// truncated to t = 2 fractional bits and read as a two's-complement number in
// [-2, 1.75]. Truncating both vectors makes v_hat at most 0.5 below v.
// The selection function is
//     p = +1  if  0.5  <= v_hat <= 1.75
//     p =  0  if -0.5  <= v_hat <= 0.25
//     p = -1  if -2    <= v_hat <= -0.75
// (selection constants m0 = -1/2, m1 = +1/2). This keeps the residual of the
// next step within +-3/4 as long as the term added per step stays below 1/4,
// which the online delay of 2 guarantees. Purely combinational.
module online_select
  import msdf_pkg::*;
#(
  parameter int W = 14,
  parameter int F = 12
) (
  input  logic [W-1:0] sum,
  input  logic [W-1:0] carry,
  output logic [3:0]   v_hat,   // estimate, two's complement, 2 fraction bits
  output bsd_t         digit
);

  always_comb begin
    v_hat = sum[F+1:F-2] + carry[F+1:F-2];
    if ($signed(v_hat) >= 4'sd2)       digit = BSD_POS;
    else if ($signed(v_hat) <= -4'sd3) digit = BSD_NEG;
    else                               digit = BSD_ZERO;
  end

  initial begin
    assert (W == F + 2) else $error("online_select: W must equal F+2");
    assert (F >= 2)     else $error("online_select: F must be at least 2");
  end

endmodule
