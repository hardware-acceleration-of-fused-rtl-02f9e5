// online_datapath: shared arithmetic of the online multiplier and the online
// inner product unit.
//
// Operands are n-digit signed-digit fractions. The product (or inner
// product, scaled by 2^-L) is produced most significant digit first by the
// serial-parallel online recurrence  v = 2(v_prev - Z) + 2^-DELTA * x_i * Y ,
// with Z the digit selected from v_prev. Instead of a parallel Y register the
// term x_i * Y is built one partial-product term per clock in the partial
// product row register (PPR) by Horner's rule, PPR = 2*PPR + P(i,j), so every
// clock adds a term of the same width and no barrel shifter is needed.
//
// A single 6:2 compressor serves both registers. Its six inputs are
//   2*PPR (sum and carry, or zero at the first column of a row),
//   the new term P(i,j),
//   2*residual (sum and carry, or zero when the residual is not updated),
//   and the constant for -2*Z.
// PPR and the residual are kept in carry-save form, W = F+2 bits each, as
// integers scaled by 2^F (F = n + DELTA + L). Because the residual stays
// within (-2, 2) all arithmetic is exact modulo 2^W, and -2*Z*2^F is then
// the single bit F+1 for Z = +1 and Z = -1 alike.
// The output digit is selected from the compressor result in the same clock
// the residual is loaded (uop.sel_en), and registered together with it; the
// registered digit is the Z used by the next residual update.
//
// Interface: uop is the control word of this clock (see msdf_pkg). en = 0
// freezes every register (early termination); nothing is lost, the unit just
// stops. digit/digit_valid show an output digit for one clock, one clock
// after the micro-instruction that selected it.
module online_datapath
  import msdf_pkg::*;
#(
  parameter int N  = 8,              // digits per operand
  parameter int L  = 3,              // result scaled by 2^-L (L = clog2 K)
  parameter int PW = 5               // width of the signed term P(i,j)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  uop_t                 uop,
  input  logic signed [PW-1:0] p_term,
  output bsd_t                 digit,
  output logic                 digit_valid
);

  localparam int F = N + DELTA + L;
  localparam int W = F + 2;

  logic [W-1:0] ppr_s, ppr_c, res_s, res_c;
  bsd_t         z_q;

  logic [W-1:0] in0, in1, in2, in3, in4, in5, cmp_s, cmp_c;
  logic [3:0]   v_hat;
  bsd_t         z_sel;

  always_comb begin
    in0 = uop.ppr_clear ? '0 : ppr_s << 1;
    in1 = uop.ppr_clear ? '0 : ppr_c << 1;
    in2 = uop.pp_en ? W'(p_term) : '0;      // sign-extended
    in3 = uop.res_add ? res_s << 1 : '0;
    in4 = uop.res_add ? res_c << 1 : '0;
    in5 = (uop.res_add && bsd_value(z_q) != 0) ? (W'(1) << (F + 1)) : '0;
  end

  csa_6to2 #(.W(W)) u_csa (
    .in0(in0), .in1(in1), .in2(in2), .in3(in3), .in4(in4), .in5(in5),
    .sum(cmp_s), .carry(cmp_c)
  );

  online_select #(.W(W), .F(F)) u_sel (
    .sum(cmp_s), .carry(cmp_c), .v_hat(v_hat), .digit(z_sel)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ppr_s       <= '0;
      ppr_c       <= '0;
      res_s       <= '0;
      res_c       <= '0;
      z_q         <= BSD_ZERO;
      digit_valid <= 1'b0;
    end else begin
      digit_valid <= 1'b0;
      if (en) begin
        if (uop.ppr_load) begin
          ppr_s <= cmp_s;
          ppr_c <= cmp_c;
        end
        if (uop.res_load) begin
          res_s       <= cmp_s;
          res_c       <= cmp_c;
          z_q         <= uop.sel_en ? z_sel : BSD_ZERO;
          digit_valid <= uop.sel_en;
        end
      end
    end
  end

  assign digit = z_q;

  // PPR and the residual are never loaded in the same clock.
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(uop.ppr_load && uop.res_load));

endmodule
