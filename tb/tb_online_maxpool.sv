// Testbench for online_maxpool: the worked example with four 8-digit inputs
// (effective flags after each of the first four digits: TTTF, FTTF, FTTF,
// FTFF; max digits 1,0,0,1), then random windows. For random inputs the
// result must be the digit-wise (lexicographic) maximum of the four digit
// strings, and an input must be marked ineffective exactly from the first
// digit where its string falls below that maximum.
module tb_online_maxpool;
  import msdf_pkg::*;
  localparam int M = 4, N = 8;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  bsd_t [M-1:0] in_digit;
  bsd_t out_digit;
  logic out_valid;
  logic [M-1:0] effective, terminate;
  int xd [M][N];
  int checks = 0, failures = 0;

  online_maxpool #(.M(M)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .in_valid(in_valid),
    .in_digit(in_digit), .out_valid(out_valid), .out_digit(out_digit),
    .effective(effective), .terminate(terminate)
  );

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Feeds the window; records output digits and effective flags.
  task automatic run_window(output int od [N], output logic [M-1:0] eff [N]);
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    for (int j = 0; j < N; j++) begin
      in_valid = 1;
      for (int i = 0; i < M; i++) in_digit[i] = bsd_from_int(xd[i][j]);
      #1;
      od[j] = bsd_value(out_digit);
      @(negedge clk);
      eff[j] = effective;
      checks++;
      if (terminate != ~effective) failures++;
    end
    in_valid = 0;
  endtask

  initial begin
    int od [N];
    logic [M-1:0] eff [N];
    int best, cmp;
    logic [M-1:0] exp_eff;
    repeat (2) @(negedge clk);
    rst_n = 1;
    xd[0] = '{1, -1, 0, 0, 0, 0, 0, 0};
    xd[1] = '{1, 0, 0, 1, 0, 1, 0, 1};
    xd[2] = '{1, 0, 0, 0, -1, -1, 0, 0};
    xd[3] = '{0, 0, 1, -1, 0, 0, 0, 0};
    run_window(od, eff);
    // effective flags are listed for inputs 1..4 as bits 0..3
    checks += 8;
    if (eff[0] != 4'b0111) failures++;
    if (eff[1] != 4'b0110) failures++;
    if (eff[2] != 4'b0110) failures++;
    if (eff[3] != 4'b0010) failures++;
    if (od[0] != 1) failures++;
    if (od[1] != 0) failures++;
    if (od[2] != 0) failures++;
    if (od[3] != 1) failures++;
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < M; i++)
        for (int j = 0; j < N; j++)
          xd[i][j] = (t % 2 == 0 && j < 2) ? 1 : int'($urandom_range(0, 2)) - 1;
      run_window(od, eff);
      // lexicographic maximum
      best = 0;
      for (int i = 1; i < M; i++) begin
        cmp = 0;
        for (int j = 0; j < N && cmp == 0; j++)
          if (xd[i][j] != xd[best][j]) cmp = (xd[i][j] > xd[best][j]) ? 1 : -1;
        if (cmp > 0) best = i;
      end
      for (int j = 0; j < N; j++) begin
        checks++;
        if (od[j] != xd[best][j]) failures++;
        for (int i = 0; i < M; i++) begin
          exp_eff[i] = 1;
          for (int q = 0; q <= j; q++) if (xd[i][q] != xd[best][q]) exp_eff[i] = 0;
        end
        checks++;
        if (eff[j] != exp_eff) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
