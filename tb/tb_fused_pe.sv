// Testbench for fused_pe with a LeNet-5 first-layer window: K = 25 terms
// (5x5 kernel, one input channel), M = 4 pixels pooled, n = 8 digits.
// Each run loads four activation windows and a kernel plane by plane, starts
// the element and collects the output digits. Run types, cycled:
//   random windows, all four pixels negative (A = -B: ReLU stops every unit
//   and the element stops early), one pixel clearly largest (MaxPool stops
//   the others), one negative pixel among positive ones, and a run killed
//   from downstream half-way.
// Checks: the pooled result p (missing digits after an early stop are 0)
// must be within 3/4 * 2^-n of relu(2^-L * S_m) for some pixel m, where S_m
// is the exact inner product (the pooling of redundant digit strings can
// pick a pixel other than the exact maximum); a complete run takes n*n+2
// clocks and yields n digits; a killed run yields no digit after the kill.
// Every mechanism (ReLU stop, MaxPool stop, early stop, downstream kill,
// complete run) must occur at least once.
module tb_fused_pe;
  import msdf_pkg::*;
  localparam int N = 8, K = 25, M = 4, L = 5;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, start = 0, kill_in = 0;
  logic [2:0] wr_buf = 0, wr_addr = 0;
  bsd_t [K-1:0] wr_plane;
  logic busy, done, stopped_early, out_valid;
  bsd_t out_digit;
  logic [M-1:0] unit_live;
  logic [15:0] cnt_relu_stop, cnt_pool_stop, cnt_early_stop, cnt_kill;
  logic [31:0] cnt_skipped;
  int ad [M][K][N], bd [K][N];
  int checks = 0, failures = 0;
  int n_complete = 0, n_early = 0, n_killed = 0;

  fused_pe #(.N(N), .K(K), .M(M)) dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_buf(wr_buf),
    .wr_addr(wr_addr), .wr_plane(wr_plane), .start(start), .kill_in(kill_in),
    .busy(busy), .done(done), .stopped_early(stopped_early),
    .out_valid(out_valid), .out_digit(out_digit), .unit_live(unit_live),
    .cnt_relu_stop(cnt_relu_stop), .cnt_pool_stop(cnt_pool_stop),
    .cnt_early_stop(cnt_early_stop), .cnt_kill(cnt_kill),
    .cnt_skipped_unit_cycles(cnt_skipped)
  );

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rd();
    return int'($urandom_range(0, 2)) - 1;
  endfunction

  task automatic load();
    for (int b = 0; b <= M; b++)
      for (int d = 0; d < N; d++) begin
        @(negedge clk);
        wr_en = 1; wr_buf = 3'(b); wr_addr = 3'(d);
        for (int k = 0; k < K; k++)
          wr_plane[k] = bsd_from_int((b == M) ? bd[k][d] : ad[b][k][d]);
      end
    @(negedge clk); wr_en = 0;
  endtask

  initial begin
    longint s [M], p_int, err, ai, bi, r;
    int ndig, cycles, kind, kill_at, ok;
    bit ended_early;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      kind = t % 5;
      for (int k = 0; k < K; k++)
        for (int d = 0; d < N; d++) begin
          bd[k][d] = rd();
          for (int m = 0; m < M; m++) begin
            case (kind)
              1: ad[m][k][d] = -bd[k][d];                           // all negative
              2: ad[m][k][d] = (m == t % M) ? bd[k][d] : rd();      // one largest
              3: ad[m][k][d] = (m == 0) ? -bd[k][d] : bd[k][d];     // one negative
              default: ad[m][k][d] = rd();
            endcase
          end
        end
      for (int m = 0; m < M; m++) begin
        s[m] = 0;
        for (int k = 0; k < K; k++) begin
          ai = 0; bi = 0;
          for (int d = 0; d < N; d++) begin ai = ai * 2 + ad[m][k][d]; bi = bi * 2 + bd[k][d]; end
          s[m] += ai * bi;
        end
      end
      load();
      kill_at = (kind == 4) ? 30 : -1;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      p_int = 0; ndig = 0; cycles = 1; ended_early = 0;
      while (!done && !stopped_early && cycles < 200) begin
        if (out_valid) begin p_int = p_int * 2 + bsd_value(out_digit); ndig++; end
        kill_in = (cycles == kill_at);
        @(negedge clk); cycles++;
      end
      kill_in = 0;
      if (out_valid) begin p_int = p_int * 2 + bsd_value(out_digit); ndig++; end
      ended_early = stopped_early;
      cycles--;
      if (kind == 4) begin
        n_killed++;
        checks += 2;
        if (!ended_early) failures++;
        repeat (80) begin
          @(negedge clk);
          if (out_valid) failures++;
        end
        if (busy) failures++;
        continue;
      end
      if (ended_early) n_early++;
      else begin
        n_complete++;
        checks += 2;
        if (cycles != N * N + DELTA) begin failures++; $display("cycles %0d", cycles); end
        if (ndig != N) begin failures++; $display("digits %0d", ndig); end
      end
      // missing digits are zero
      p_int = p_int <<< (N - ndig);
      ok = 0;
      for (int m = 0; m < M; m++) begin
        r = (s[m] > 0) ? s[m] : 0;
        err = r - (p_int <<< (N + L));
        if (err < 0) err = -err;
        if (4 * err <= 3 * (longint'(1) <<< (N + L))) ok = 1;
      end
      checks++;
      if (!ok) begin
        failures++;
        $display("t=%0d kind=%0d p=%0d s=%0d %0d %0d %0d", t, kind, p_int, s[0], s[1], s[2], s[3]);
      end
      checks++;
      if (p_int < 0) failures++;
    end
    $display("complete=%0d early=%0d killed=%0d relu_stops=%0d pool_stops=%0d early_stops=%0d kills=%0d skipped=%0d",
             n_complete, n_early, n_killed, cnt_relu_stop, cnt_pool_stop,
             cnt_early_stop, cnt_kill, cnt_skipped);
    checks += 7;
    if (n_complete == 0) failures++;
    if (n_early == 0) failures++;
    if (cnt_relu_stop == 0) failures++;
    if (cnt_pool_stop == 0) failures++;
    if (cnt_kill != 16'(n_killed)) failures++;
    if (cnt_early_stop != 16'(n_early + n_killed)) failures++;
    if (cnt_skipped == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
