// Testbench for online_select: every combination of the four estimate bits
// of the sum and carry vectors (lower bits random); the estimate must be the
// 4-bit sum of the top bits and the digit must follow the selection table
// (+1 for v_hat >= 1/2, -1 for v_hat <= -3/4, else 0).
module tb_online_select;
  import msdf_pkg::*;
  localparam int F = 6;
  localparam int W = F + 2;
  logic [W-1:0] s, c;
  logic [3:0]   v_hat;
  bsd_t         digit;
  int checks = 0, failures = 0;
  int est_q, exp_d;

  online_select #(.W(W), .F(F)) dut (.sum(s), .carry(c), .v_hat(v_hat), .digit(digit));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        s = {4'(a), 4'($urandom)};
        c = {4'(b), 4'($urandom)};
        #1;
        // estimate in quarter units, wrapped into [-8, 7]
        est_q = (a + b) % 16;
        if (est_q >= 8) est_q -= 16;
        exp_d = (est_q >= 2) ? 1 : (est_q <= -3) ? -1 : 0;
        checks += 2;
        if ($signed(v_hat) != est_q) failures++;
        if (bsd_value(digit) != exp_d) begin
          failures++;
          $display("a=%0d b=%0d est=%0d digit=%0d expected %0d", a, b, est_q,
                   bsd_value(digit), exp_d);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
