// Testbench for online_ctrl: steps through whole programs and compares each
// micro-instruction with the schedule (row = step / n, column = step % n,
// PPR cleared on column 0, residual loaded on column n-1, digits selected
// from row 2 on and in the two flush steps); checks the program length
// (n*n + 2 clocks from start to done) and that kill stops it at once.
module tb_online_ctrl;
  import msdf_pkg::*;
  localparam int N = 8;
  localparam int NSTEPS = N * N + DELTA;
  logic clk = 0, rst_n = 0, start = 0, kill = 0;
  logic busy, done, killed;
  uop_t uop;
  logic [2:0] a_idx, b_idx;
  logic [6:0] step;
  int checks = 0, failures = 0;

  online_ctrl #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .kill(kill), .busy(busy),
    .uop(uop), .a_idx(a_idx), .b_idx(b_idx), .step(step), .done(done),
    .killed(killed)
  );

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(string what, logic got, logic exp, int s);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("step %0d: %s = %0b, expected %0b", s, what, got, exp);
    end
  endtask

  initial begin
    int r, c, cycles;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cycles = 1;
      for (int s = 0; s < NSTEPS; s++) begin
        r = (s < N * N) ? s / N : 0;
        c = (s < N * N) ? s % N : 0;
        expect_bit("busy", busy, 1'b1, s);
        checks += 2;
        if (int'(a_idx) != r) failures++;
        if (int'(b_idx) != c) failures++;
        expect_bit("pp_en", uop.pp_en, s < N * N, s);
        expect_bit("ppr_clear", uop.ppr_clear, (s >= N * N) || c == 0, s);
        expect_bit("ppr_load", uop.ppr_load, (s < N * N) && c != N - 1, s);
        expect_bit("res_load", uop.res_load, (s >= N * N) || c == N - 1, s);
        expect_bit("res_add", uop.res_add, (s >= N * N) || (c == N - 1 && r > 0), s);
        expect_bit("sel_en", uop.sel_en, (s >= N * N) || (c == N - 1 && r >= DELTA), s);
        expect_bit("last", uop.last, s == NSTEPS - 1, s);
        @(negedge clk);
        cycles++;
        if (s < NSTEPS - 1) expect_bit("done", done, 1'b0, s);
      end
      // done is seen n*n+2 clocks after the clock edge that took start
      expect_bit("done", done, 1'b1, NSTEPS);
      expect_bit("busy_after", busy, 1'b0, NSTEPS);
      checks++;
      if (cycles - 1 != NSTEPS) failures++;
    end
    // kill in the middle of a program
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    repeat (10) @(negedge clk);
    kill = 1;
    @(negedge clk); kill = 0;
    expect_bit("busy_killed", busy, 1'b0, -1);
    expect_bit("killed", killed, 1'b1, -1);
    repeat (80) begin
      @(negedge clk);
      expect_bit("no_done_after_kill", done, 1'b0, -1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
