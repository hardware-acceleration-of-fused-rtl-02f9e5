// Testbench for csa_6to2: random and corner operands; the sum and carry
// vectors must add up to the modulo-2^W total of the six inputs.
module tb_csa_6to2;
  localparam int W = 16;
  logic [W-1:0] in [6];
  logic [W-1:0] sum, carry, ref_total;
  int checks = 0, failures = 0;

  csa_6to2 #(.W(W)) dut (
    .in0(in[0]), .in1(in[1]), .in2(in[2]), .in3(in[3]), .in4(in[4]), .in5(in[5]),
    .sum(sum), .carry(carry)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < 6; i++) begin
        if (t < 4) in[i] = (t == 0) ? '0 : (t == 1) ? '1 : (t == 2) ? W'(1 << (W-1)) : W'(i);
        else       in[i] = W'($urandom);
      end
      #1;
      ref_total = in[0] + in[1] + in[2] + in[3] + in[4] + in[5];
      checks++;
      if (W'(sum + carry) !== ref_total) begin
        failures++;
        if (failures < 5) $display("mismatch: %h + %h != %h", sum, carry, ref_total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
