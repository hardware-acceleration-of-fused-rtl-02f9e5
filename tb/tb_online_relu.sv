// Testbench for online_relu: the two worked examples (.00-111111 stops after
// the third digit; .01000000 is positive after the second) and random
// digit strings. For each string the output must be the input string when
// its first non-zero digit is +1 and all zeros otherwise, terminate must
// rise exactly after the first non-zero digit when that digit is -1, and
// positive exactly when it is +1.
module tb_online_relu;
  import msdf_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  bsd_t in_digit, out_digit;
  logic out_valid, terminate, positive;
  int xd [N];
  int checks = 0, failures = 0;

  online_relu dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .in_valid(in_valid),
    .in_digit(in_digit), .out_valid(out_valid), .out_digit(out_digit),
    .terminate(terminate), .positive(positive)
  );

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_string(output int term_at);
    int first_nz = 0, exp_out;
    bit seen = 0;
    term_at = -1;
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    for (int j = 0; j < N; j++) begin
      in_valid = 1;
      in_digit = bsd_from_int(xd[j]);
      if (!seen && xd[j] != 0) begin seen = 1; first_nz = xd[j]; end
      #1;
      exp_out = (seen && first_nz > 0) ? xd[j] : 0;
      checks += 2;
      if (bsd_value(out_digit) != exp_out) failures++;
      if (!out_valid) failures++;
      @(negedge clk);
      in_valid = 0;
      checks += 2;
      if (terminate != (seen && first_nz < 0)) failures++;
      if (positive != (seen && first_nz > 0)) failures++;
      if (terminate && term_at < 0) term_at = j + 1;
    end
  endtask

  initial begin
    int term_at;
    repeat (2) @(negedge clk);
    rst_n = 1;
    xd = '{0, 0, -1, 1, 1, 1, 1, 1};
    run_string(term_at);
    checks++;
    if (term_at != 3) failures++;
    xd = '{0, 1, 0, 0, 0, 0, 0, 0};
    run_string(term_at);
    checks += 2;
    if (term_at != -1) failures++;
    if (!positive) failures++;
    for (int t = 0; t < 500; t++) begin
      for (int j = 0; j < N; j++)
        xd[j] = ($urandom_range(0, 3) == 0) ? int'($urandom_range(0, 2)) - 1 : 0;
      run_string(term_at);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
