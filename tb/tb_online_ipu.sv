// Testbench for online_ipu driven by online_ctrl, n = 8 digits, K = 8
// terms. Random digit planes (and the extreme all-ones / opposite-sign
// cases) are served from arrays. Checks per inner product: n digits, first
// digit after row 3, done n*n+2 clocks after start, and
//   |2^-L * sum_k A_k B_k - p| <= 3/4 * 2^-n    (L = clog2 K)
// in integers scaled by 2^(2n+L). A run with en = 0 must give no digits.
module tb_online_ipu;
  import msdf_pkg::*;
  localparam int N = 8, K = 8, L = 3;
  logic clk = 0, rst_n = 0, start = 0, en = 1;
  logic busy, done, killed, digit_valid;
  uop_t uop;
  logic [2:0] a_idx, b_idx;
  logic [6:0] step;
  bsd_t digit;
  bsd_t [K-1:0] a_plane, b_plane;
  int ad [K][N], bd [K][N];
  int checks = 0, failures = 0;

  online_ctrl #(.N(N)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .kill(1'b0), .busy(busy),
    .uop(uop), .a_idx(a_idx), .b_idx(b_idx), .step(step), .done(done),
    .killed(killed)
  );

  online_ipu #(.N(N), .K(K)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .uop(uop), .a_plane(a_plane),
    .b_plane(b_plane), .digit(digit), .digit_valid(digit_valid)
  );

  always #5 clk = ~clk;
  always_comb
    for (int k = 0; k < K; k++) begin
      a_plane[k] = bsd_from_int(ad[k][a_idx]);
      b_plane[k] = bsd_from_int(bd[k][b_idx]);
    end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint s, p_int, err, ai, bi;
    int ndig, cycles, first_at;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 301; t++) begin
      en = (t != 300);
      for (int k = 0; k < K; k++)
        for (int i = 0; i < N; i++) begin
          case (t)
            0: begin ad[k][i] = 1;  bd[k][i] = 1; end
            1: begin ad[k][i] = -1; bd[k][i] = 1; end
            2: begin ad[k][i] = (i == 0) ? 1 : -1; bd[k][i] = 1; end
            default: begin
              ad[k][i] = int'($urandom_range(0, 2)) - 1;
              bd[k][i] = int'($urandom_range(0, 2)) - 1;
            end
          endcase
        end
      s = 0;
      for (int k = 0; k < K; k++) begin
        ai = 0; bi = 0;
        for (int i = 0; i < N; i++) begin ai = ai * 2 + ad[k][i]; bi = bi * 2 + bd[k][i]; end
        s += ai * bi;
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      p_int = 0; ndig = 0; cycles = 1; first_at = -1;
      while (!done && cycles < 200) begin
        if (digit_valid) begin
          if (ndig == 0) first_at = cycles;
          p_int = p_int * 2 + bsd_value(digit); ndig++;
        end
        @(negedge clk); cycles++;
      end
      if (digit_valid) begin p_int = p_int * 2 + bsd_value(digit); ndig++; end
      cycles--;
      checks += 2;
      if (cycles != N * N + DELTA) begin failures++; $display("cycles %0d", cycles); end
      if (!en) begin
        if (ndig != 0) failures++;
      end else begin
        if (ndig != N) failures++;
        err = s - (p_int <<< (N + L));
        if (err < 0) err = -err;
        checks += 2;
        if (first_at != 3 * N + 1) failures++;
        if (4 * err > 3 * (longint'(1) <<< (N + L))) begin
          failures++;
          if (failures < 10) $display("t=%0d sum=%0d p=%0d", t, s, p_int);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
