// online_multiplier: utilization-balanced radix-2 online multiplier.
//
// Multiplies two n-digit signed-digit fractions x and y (digits in {-1,0,1})
// and produces the n-digit product most significant digit first. Both
// operands stay in their source buffer and are read one digit at a time:
// the unit follows the serial-parallel order of partial products, row by
// row (digit x_i times every digit y_j), so that every clock adds exactly
// one single-digit term to the partial product row register and the
// compressor width never changes. The row sum enters the online residual
// once per row, so one result takes n*n + 2 clocks (66 for n = 8) and the
// first product digit appears at the end of row 3 (online delay 2).
//
// The product digits p_1..p_n satisfy |x*y - sum p_j 2^-j| <= 3/4 * 2^-n.
//
// Interface: pulse start while idle. x_idx / y_idx name the operand digit
// (0 = most significant) that must be on x_digit / y_digit in the same
// clock (asynchronous read). p_digit/p_valid give one product digit per
// pulse of p_valid, most significant first; done pulses after the last
// micro-instruction, together with the last p_valid. kill stops the
// multiplication at once (early termination by a consumer).
module online_multiplier
  import msdf_pkg::*;
#(
  parameter int N = 8,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          kill,
  output logic [IW-1:0] x_idx,
  output logic [IW-1:0] y_idx,
  input  bsd_t          x_digit,
  input  bsd_t          y_digit,
  output bsd_t          p_digit,
  output logic          p_valid,
  output logic          busy,
  output logic          done
);

  uop_t              uop;
  logic              killed;
  logic [$clog2(N*N+DELTA)-1:0] step;
  logic signed [1:0] p_term;

  online_ctrl #(.N(N)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .kill(kill),
    .busy(busy), .uop(uop), .a_idx(x_idx), .b_idx(y_idx), .step(step),
    .done(done), .killed(killed)
  );

  // Single-digit partial product x_i * y_j.
  always_comb begin
    p_term = 2'sd0;
    if (bsd_value(x_digit) != 0 && bsd_value(y_digit) != 0)
      p_term = (bsd_is_neg(x_digit) == bsd_is_neg(y_digit)) ? 2'sd1 : -2'sd1;
  end

  online_datapath #(.N(N), .L(0), .PW(2)) u_dp (
    .clk(clk), .rst_n(rst_n), .en(busy), .uop(uop), .p_term(p_term),
    .digit(p_digit), .digit_valid(p_valid)
  );

endmodule
