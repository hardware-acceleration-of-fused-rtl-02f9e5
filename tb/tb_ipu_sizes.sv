// Workload testbench: the online inner product unit at every size of the
// hardware evaluation, K = 8, 16, 32, 64, 128, 256, 512 and 1024 terms of
// n = 8 digit operands. One sequencer drives all eight units in lock-step
// (each with its own random digit planes). For every unit and run it checks
// that the result has 8 digits, that it is ready 66 clocks after start
// (n*n + 2, independent of K) and that
//   |2^-L * sum A_k B_k - p| <= 3/4 * 2^-n ,  L = clog2 K.
module tb_ipu_sizes;
  import msdf_pkg::*;
  localparam int N = 8, NS = 8, KMAX = 1024;
  localparam int KS [NS] = '{8, 16, 32, 64, 128, 256, 512, 1024};
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, killed;
  uop_t uop;
  logic [2:0] a_idx, b_idx;
  logic [6:0] step;
  bsd_t [NS-1:0] digit;
  logic [NS-1:0] digit_valid;
  int ad [KMAX][N], bd [KMAX][N];
  int checks = 0, failures = 0;

  online_ctrl #(.N(N)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .kill(1'b0), .busy(busy),
    .uop(uop), .a_idx(a_idx), .b_idx(b_idx), .step(step), .done(done),
    .killed(killed)
  );

  // Unit u uses the first KS[u] operand pairs.
  for (genvar u = 0; u < NS; u++) begin : g_unit
    localparam int K = KS[u];
    bsd_t [K-1:0] a_plane, b_plane;
    always_comb
      for (int k = 0; k < K; k++) begin
        a_plane[k] = bsd_from_int(ad[k][a_idx]);
        b_plane[k] = bsd_from_int(bd[k][b_idx]);
      end
    online_ipu #(.N(N), .K(K)) u_ipu (
      .clk(clk), .rst_n(rst_n), .en(1'b1), .uop(uop), .a_plane(a_plane),
      .b_plane(b_plane), .digit(digit[u]), .digit_valid(digit_valid[u])
    );
  end

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint s [NS], p_int [NS], err, ai, bi;
    int ndig [NS], cycles, l;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      for (int k = 0; k < KMAX; k++)
        for (int i = 0; i < N; i++) begin
          ad[k][i] = (t == 0) ? 1 : int'($urandom_range(0, 2)) - 1;
          bd[k][i] = (t == 0) ? 1 : (t == 1) ? -ad[k][i] : int'($urandom_range(0, 2)) - 1;
        end
      for (int u = 0; u < NS; u++) begin
        s[u] = 0;
        for (int k = 0; k < KS[u]; k++) begin
          ai = 0; bi = 0;
          for (int i = 0; i < N; i++) begin ai = ai * 2 + ad[k][i]; bi = bi * 2 + bd[k][i]; end
          s[u] += ai * bi;
        end
        p_int[u] = 0;
        ndig[u] = 0;
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cycles = 1;
      while (!done && cycles < 200) begin
        for (int u = 0; u < NS; u++)
          if (digit_valid[u]) begin p_int[u] = p_int[u] * 2 + bsd_value(digit[u]); ndig[u]++; end
        @(negedge clk); cycles++;
      end
      for (int u = 0; u < NS; u++)
        if (digit_valid[u]) begin p_int[u] = p_int[u] * 2 + bsd_value(digit[u]); ndig[u]++; end
      cycles--;
      checks++;
      if (cycles != N * N + DELTA) failures++;
      for (int u = 0; u < NS; u++) begin
        l = $clog2(KS[u]);
        err = s[u] - (p_int[u] <<< (N + l));
        if (err < 0) err = -err;
        checks += 2;
        if (ndig[u] != N) failures++;
        if (4 * err > 3 * (longint'(1) <<< (N + l))) begin
          failures++;
          $display("K=%0d sum=%0d p=%0d", KS[u], s[u], p_int[u]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
