// Testbench of fused_layer_pair at a reduced size (n = 8 digits, 9-term
// layer-1 kernels, 2x2 pooling, 12 layer-1 elements feeding a 12-term
// layer-2 inner product); the full LeNet-5 size is run by the top-level
// testbench. Data are random digits unless stated.
// Run types:
//   positive  - layer-1 windows with positive pixels, layer-2 kernel all +1
//               (complete run; checks the pipelined length 3n+1+n*n+2 = 91)
//   negative  - all layer-1 digits +1 (large activations), layer-2 kernel
//               all -1: layer-2 ReLU turns negative while layer 1 is still
//               running and kills it
//   random    - random digits; every eighth layer-1 element gets a window of
//               negative pixels only, so it stops on its own
//   killed    - random, kill_in raised half-way
// Checks after each run, from the layer-1 digits as stored for layer 2:
// every layer-1 result lies within 3/4 * 2^-n of the rectified value of
// one of its pixels; the layer-2 result lies within 3/4 * 2^-n of
// relu(2^-L2 * sum a_k w_k). A negative run must give an all-zero result,
// stop early and have killed running layer-1 elements. The layer-1
// statistics outputs must have counted ReLU stops, MaxPool stops and
// elements stopping on their own.
module tb_fused_layer_pair;
  import msdf_pkg::*;
  localparam int N = 8, K1 = 9, M = 4, K2 = 12, L1 = 4, L2 = 4, PW = 4;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, w2_wr_en = 0, start = 0, kill_in = 0;
  logic [PW-1:0] wr_pe = 0;
  logic [2:0] wr_buf = 0, wr_addr = 0, w2_wr_addr = 0;
  bsd_t [K1-1:0] wr_plane;
  bsd_t [K2-1:0] w2_wr_plane;
  logic busy, done, stopped_early, out_valid;
  bsd_t out_digit;
  logic [K2-1:0] l1_busy;
  logic [15:0] cnt_backward_kill;
  logic [31:0] c_relu, c_pool, c_early;
  int ad [M][K1][N], bd [K1][N], wd [K2][N];
  longint s1 [K2][M];
  int checks = 0, failures = 0;
  int n_complete = 0, n_backward = 0, n_killed = 0;

  fused_layer_pair #(.N(N), .K1(K1), .M(M), .K2(K2)) dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_pe(wr_pe), .wr_buf(wr_buf),
    .wr_addr(wr_addr), .wr_plane(wr_plane), .w2_wr_en(w2_wr_en),
    .w2_wr_addr(w2_wr_addr), .w2_wr_plane(w2_wr_plane), .start(start),
    .kill_in(kill_in), .busy(busy), .done(done), .stopped_early(stopped_early),
    .out_valid(out_valid), .out_digit(out_digit), .l1_busy(l1_busy),
    .cnt_backward_kill(cnt_backward_kill), .cnt_l1_relu_stop(c_relu),
    .cnt_l1_pool_stop(c_pool), .cnt_l1_early_stop(c_early)
  );

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rd();
    return int'($urandom_range(0, 2)) - 1;
  endfunction

  // Fills and loads layer-1 element p.
  // mode 0: random, 1: positive pixels (A = B), 2: all digits +1,
  // 3: every pixel negative (A = -B).
  task automatic load_l1(int p, int mode);
    longint ai, bi;
    for (int k = 0; k < K1; k++)
      for (int d = 0; d < N; d++) begin
        bd[k][d] = (mode == 2) ? 1 : rd();
        for (int m = 0; m < M; m++)
          ad[m][k][d] = (mode == 0) ? rd() : (mode == 3) ? -bd[k][d] : bd[k][d];
      end
    for (int m = 0; m < M; m++) begin
      s1[p][m] = 0;
      for (int k = 0; k < K1; k++) begin
        ai = 0; bi = 0;
        for (int d = 0; d < N; d++) begin ai = ai * 2 + ad[m][k][d]; bi = bi * 2 + bd[k][d]; end
        s1[p][m] += ai * bi;
      end
    end
    for (int b = 0; b <= M; b++)
      for (int d = 0; d < N; d++) begin
        @(negedge clk);
        wr_en = 1; wr_pe = PW'(p); wr_buf = 3'(b); wr_addr = 3'(d);
        for (int k = 0; k < K1; k++)
          wr_plane[k] = bsd_from_int((b == M) ? bd[k][d] : ad[b][k][d]);
      end
    @(negedge clk); wr_en = 0;
  endtask

  task automatic load_w2(int mode);
    for (int k = 0; k < K2; k++)
      for (int d = 0; d < N; d++) wd[k][d] = (mode == 0) ? rd() : mode;
    for (int d = 0; d < N; d++) begin
      @(negedge clk);
      w2_wr_en = 1; w2_wr_addr = 3'(d);
      for (int k = 0; k < K2; k++) w2_wr_plane[k] = bsd_from_int(wd[k][d]);
    end
    @(negedge clk); w2_wr_en = 0;
  endtask

  initial begin
    longint a2 [K2], wi, s2, p_int, err, r;
    int ndig, cycles, kind, ok, busy_at_kill;
    bit early;
    logic [15:0] bk_before;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 24; t++) begin
      kind = t % 4;   // 0 positive, 1 negative, 2 random, 3 killed
      for (int p = 0; p < K2; p++)
        load_l1(p, (kind == 1) ? 2 : (kind == 0) ? 1 : (p % 8 == 3) ? 3 : 0);
      load_w2((kind == 0) ? 1 : (kind == 1) ? -1 : 0);
      bk_before = cnt_backward_kill;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      p_int = 0; ndig = 0; cycles = 1; busy_at_kill = 0;
      while (!done && !stopped_early && cycles < 300) begin
        if (out_valid) begin p_int = p_int * 2 + bsd_value(out_digit); ndig++; end
        kill_in = (kind == 3 && cycles == 60);
        busy_at_kill = $countones(l1_busy);
        @(negedge clk); cycles++;
      end
      early = stopped_early;
      kill_in = 0;
      if (out_valid) begin p_int = p_int * 2 + bsd_value(out_digit); ndig++; end
      cycles--;
      repeat (100) @(negedge clk);   // let layer 1 finish
      // layer-1 results as stored for layer 2
      for (int p = 0; p < K2; p++) begin
        a2[p] = 0;
        for (int d = 0; d < N; d++) a2[p] = a2[p] * 2 + bsd_value(dut.act2_q[d][p]);
      end
      if (kind == 3) begin
        n_killed++;
        checks++;
        if (!early) begin failures++; $display("t=%0d not killed", t); end
        continue;
      end
      if (kind == 1) begin
        checks += 3;
        if (!early) failures++;
        if (p_int != 0) begin failures++; $display("t=%0d negative run p=%0d", t, p_int); end
        if (cnt_backward_kill == bk_before) failures++;
        else n_backward++;
        $display("negative run: stopped after %0d clocks, layer-1 elements running at the kill: %0d",
                 cycles, busy_at_kill);
        continue;
      end
      // a random run may end early by a backward kill: result must be 0
      if (early) begin
        checks++;
        if (p_int != 0) failures++;
        n_backward++;
        continue;
      end
      // layer-1 values (complete runs only)
      for (int p = 0; p < K2; p++) begin
        ok = 0;
        for (int m = 0; m < M; m++) begin
          r = (s1[p][m] > 0) ? s1[p][m] : 0;
          err = r - (a2[p] <<< (N + L1));
          if (err < 0) err = -err;
          if (4 * err <= 3 * (longint'(1) <<< (N + L1))) ok = 1;
        end
        checks++;
        if (!ok) begin failures++; $display("layer-1 element %0d: %0d", p, a2[p]); end
      end
      n_complete++;
      s2 = 0;
      for (int k = 0; k < K2; k++) begin
        wi = 0;
        for (int d = 0; d < N; d++) wi = wi * 2 + wd[k][d];
        s2 += a2[k] * wi;
      end
      r = (s2 > 0) ? s2 : 0;
      err = r - (p_int <<< (N + L2));
      if (err < 0) err = -err;
      checks += 3;
      if (cycles != 3 * N + 1 + N * N + DELTA) begin failures++; $display("cycles %0d", cycles); end
      if (ndig != N) begin failures++; $display("t=%0d digits %0d", t, ndig); end
      if (4 * err > 3 * (longint'(1) <<< (N + L2))) begin
        failures++;
        $display("t=%0d s2=%0d p=%0d", t, s2, p_int);
      end
    end
    $display("complete=%0d backward_kills=%0d external_kills=%0d", n_complete, n_backward, n_killed);
    $display("layer 1: relu_stops=%0d pool_stops=%0d elements_stopped_on_their_own=%0d",
             c_relu, c_pool, c_early);
    checks += 6;
    if (c_relu == 0) failures++;
    if (c_pool == 0) failures++;
    if (c_early == 0) failures++;
    if (n_complete == 0) failures++;
    if (n_backward == 0) failures++;
    if (n_killed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
