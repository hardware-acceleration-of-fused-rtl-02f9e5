// Testbench for online_datapath: the testbench itself plays the sequencer.
// It issues the row-by-row schedule for one n=4 digit multiplication per
// operand pair (single-digit terms, L = 0), collects the n output digits and
// checks |x*y - p| <= 3/4 * 2^-n for every pair of 4-digit operands with
// digits in {-1,0,1} (exhaustive, 6561 pairs). It also checks that en = 0
// freezes the unit: a run with en low yields no digits.
module tb_online_datapath;
  import msdf_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, en = 1;
  uop_t uop;
  logic signed [1:0] p_term;
  bsd_t digit;
  logic digit_valid;
  int xd [N], yd [N];
  int checks = 0, failures = 0;

  online_datapath #(.N(N), .L(0), .PW(2)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .uop(uop), .p_term(p_term),
    .digit(digit), .digit_valid(digit_valid)
  );

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs one multiplication; returns the digits as an integer (scaled 2^n).
  task automatic multiply(output int p_int, output int ndig);
    p_int = 0; ndig = 0;
    for (int s = 0; s < N * N + DELTA; s++) begin
      @(negedge clk);
      if (digit_valid) begin p_int = p_int * 2 + bsd_value(digit); ndig++; end
      uop = UOP_NOP;
      p_term = 2'sd0;
      if (s < N * N) begin
        int r = s / N, c = s % N;
        uop.pp_en     = 1;
        uop.ppr_clear = (c == 0);
        uop.ppr_load  = (c != N - 1);
        uop.res_load  = (c == N - 1);
        uop.res_add   = (c == N - 1) && r > 0;
        uop.sel_en    = (c == N - 1) && r >= 2;
        p_term = 2'(xd[r] * yd[c]);
      end else begin
        uop.ppr_clear = 1; uop.res_load = 1; uop.res_add = 1; uop.sel_en = 1;
      end
    end
    @(negedge clk);
    if (digit_valid) begin p_int = p_int * 2 + bsd_value(digit); ndig++; end
    uop = UOP_NOP;
  endtask

  initial begin
    int p_int, ndig, xi, yi, err, code;
    uop = UOP_NOP;
    p_term = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 81; a++)
      for (int b = 0; b < 81; b++) begin
        code = a;
        for (int i = N - 1; i >= 0; i--) begin xd[i] = code % 3 - 1; code /= 3; end
        code = b;
        for (int i = N - 1; i >= 0; i--) begin yd[i] = code % 3 - 1; code /= 3; end
        xi = 0; yi = 0;
        for (int i = 0; i < N; i++) begin xi = xi * 2 + xd[i]; yi = yi * 2 + yd[i]; end
        multiply(p_int, ndig);
        err = xi * yi - p_int * (1 << N);
        if (err < 0) err = -err;
        checks += 2;
        if (ndig != N) failures++;
        if (4 * err > 3 * (1 << N)) begin
          failures++;
          if (failures < 10) $display("x=%0d y=%0d p=%0d", xi, yi, p_int);
        end
      end
    en = 0;
    multiply(p_int, ndig);
    checks++;
    if (ndig != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
