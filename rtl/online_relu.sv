// online_relu: ReLU on a most-significant-digit-first stream, with early
// termination.
//
// A three-state machine watches the signed digits of its input:
//   WAIT (no non-zero digit yet): a 0 passes as 0; a +1 means the value is
//        positive (go to POS); a -1 means it is negative (go to NEG).
//   POS: every later digit passes unchanged; the rest must be computed.
//   NEG: the output is 0 from the deciding digit on, and terminate is high:
//        the producer of the input may stop, its remaining digits are not
//        needed.
// Example: .0 0 -1 1 1 1 1 1 is negative after the third digit, the other
// five are skipped. The output is combinational (same clock as the input);
// in NEG it keeps emitting 0 digits on in_valid even if the producer has
// stopped sending real digits. clear returns the machine to WAIT.
module online_relu
  import msdf_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic in_valid,
  input  bsd_t in_digit,
  output logic out_valid,
  output bsd_t out_digit,
  output logic terminate,
  output logic positive
);

  typedef enum logic [1:0] {S_WAIT, S_NEG, S_POS} relu_state_e;

  relu_state_e state, state_next;

  always_comb begin
    state_next = state;
    out_digit  = BSD_ZERO;
    unique case (state)
      S_WAIT: if (in_valid) begin
        if (bsd_is_pos(in_digit)) begin
          state_next = S_POS;
          out_digit  = in_digit;
        end else if (bsd_is_neg(in_digit)) begin
          state_next = S_NEG;
        end
      end
      S_POS:   out_digit = in_digit;
      S_NEG:   out_digit = BSD_ZERO;
      default: state_next = S_WAIT;
    endcase
  end

  assign out_valid = in_valid;
  assign terminate = (state == S_NEG);
  assign positive  = (state == S_POS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= S_WAIT;
    else if (clear) state <= S_WAIT;
    else            state <= state_next;
  end

endmodule
