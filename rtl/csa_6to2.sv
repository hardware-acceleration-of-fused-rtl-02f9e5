// csa_6to2: 6:2 carry-save compressor.
//
// Reduces six W-bit two's-complement operands to a sum vector and a carry
// vector whose modulo-2^W total equals the modulo-2^W total of the inputs.
// It is built from four rows of 3:2 full-adder counters (two in parallel,
// then two in series), so its delay is three full-adder levels and does not
// grow with W. Carries out of bit W-1 are dropped: every user keeps its
// values inside the W-bit range, so the wrap is exact.
// Purely combinational.
module csa_6to2 #(
  parameter int W = 16
) (
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  input  logic [W-1:0] in3,
  input  logic [W-1:0] in4,
  input  logic [W-1:0] in5,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] s1, c1, s2, c2, s3, c3;

  // One row of 3:2 counters; the carry vector is shifted to its weight.
  function automatic logic [2*W-1:0] fa_row(logic [W-1:0] a, logic [W-1:0] b,
                                            logic [W-1:0] c);
    logic [W-1:0] s, m;
    s = a ^ b ^ c;
    m = (a & b) | (a & c) | (b & c);
    return {s, m << 1};
  endfunction

  always_comb begin
    {s1, c1}     = fa_row(in0, in1, in2);
    {s2, c2}     = fa_row(in3, in4, in5);
    {s3, c3}     = fa_row(s1, c1, s2);
    {sum, carry} = fa_row(s3, c3, c2);
  end

endmodule
