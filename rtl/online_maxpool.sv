// online_maxpool: maximum of M most-significant-digit-first streams, with
// early termination.
//
// An "effective" flag per input starts true. At each digit position the
// largest digit among the still-effective inputs is the output digit; every
// effective input whose digit is smaller loses its flag. An input that is not
// effective can no longer be the maximum, so the unit producing it may stop
// (terminate[i] high). The inputs that stay effective share the output
// prefix, so the result equals one input's digit string. Because digits are
// redundant this is the maximum of the digit strings compared digit by
// digit, which matches the true maximum in almost all cases but not always
// (for example .1-1-1-1 = 1/16 beats .0111 = 7/16).
//
// Interface: all M inputs deliver digit j in the same clock (in_valid).
// out_digit/out_valid are combinational from the inputs. clear makes every
// input effective again (start of a new window).
module online_maxpool
  import msdf_pkg::*;
#(
  parameter int M = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         in_valid,
  input  bsd_t [M-1:0] in_digit,
  output logic         out_valid,
  output bsd_t         out_digit,
  output logic [M-1:0] effective,
  output logic [M-1:0] terminate
);

  logic [M-1:0] eff_q, eff_next;
  int           maxd;

  always_comb begin
    maxd = -1;
    for (int i = 0; i < M; i++)
      if (eff_q[i] && bsd_value(in_digit[i]) > maxd) maxd = bsd_value(in_digit[i]);
    for (int i = 0; i < M; i++)
      eff_next[i] = eff_q[i] && (bsd_value(in_digit[i]) == maxd);
  end

  assign out_valid = in_valid;
  assign out_digit = bsd_from_int(maxd);
  assign effective = eff_q;
  assign terminate = ~eff_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        eff_q <= '1;
    else if (clear)    eff_q <= '1;
    else if (in_valid) eff_q <= eff_next;
  end

  // At least one input always stays effective.
  assert property (@(posedge clk) disable iff (!rst_n) eff_q != '0);

endmodule
