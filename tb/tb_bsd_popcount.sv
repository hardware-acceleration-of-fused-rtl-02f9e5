// Testbench for bsd_popcount: random digit planes in both encodings of zero;
// the result must equal the sum of the K digit products.
module tb_bsd_popcount;
  import msdf_pkg::*;
  localparam int K  = 25;
  localparam int PW = $clog2(K + 1) + 1;
  bsd_t [K-1:0] a, b;
  logic signed [PW-1:0] p;
  int checks = 0, failures = 0;
  int exp_p;

  bsd_popcount #(.K(K)) dut (.a_plane(a), .b_plane(b), .p_term(p));

  function automatic bsd_t rand_digit(int bias);
    int r = int'($urandom_range(0, 3));
    if (bias > 0) return BSD_POS;
    if (bias < 0) return BSD_NEG;
    case (r)
      0: return BSD_POS;
      1: return BSD_NEG;
      2: return '{pos: 1'b0, neg_n: 1'b1};
      default: return '{pos: 1'b1, neg_n: 1'b0};
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < K; k++) begin
        a[k] = rand_digit((t == 0) ? 1 : (t == 1) ? 1 : 0);
        b[k] = rand_digit((t == 0) ? 1 : (t == 1) ? -1 : 0);
      end
      #1;
      exp_p = 0;
      for (int k = 0; k < K; k++) exp_p += bsd_value(a[k]) * bsd_value(b[k]);
      checks++;
      if (int'(p) != exp_p) begin
        failures++;
        if (failures < 5) $display("p=%0d expected %0d", p, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
