// Testbench for online_multiplier: random and corner operand pairs. The
// operands are served from a digit array like a buffer would. For each
// product it checks the number of digits, the latency (done n*n+2 clocks
// after start, the first digit after row 3) and the value:
//   |x*y - p| <= 3/4 * 2^-n , computed in integers scaled by 2^(2n).
// Finally a multiplication is killed half-way and must stop.
module tb_online_multiplier;
  import msdf_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, start = 0, kill = 0;
  logic [2:0] x_idx, y_idx;
  bsd_t x_digit, y_digit, p_digit;
  logic p_valid, busy, done;
  int xd [N], yd [N];
  int checks = 0, failures = 0;

  online_multiplier #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .kill(kill),
    .x_idx(x_idx), .y_idx(y_idx), .x_digit(x_digit), .y_digit(y_digit),
    .p_digit(p_digit), .p_valid(p_valid), .busy(busy), .done(done)
  );

  always #5 clk = ~clk;
  assign x_digit = bsd_from_int(xd[x_idx]);
  assign y_digit = bsd_from_int(yd[y_idx]);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(output longint p_int, output int ndig, output int cycles,
                         output int first_at);
    p_int = 0; ndig = 0; cycles = 0; first_at = -1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done && cycles < 200) begin
      if (p_valid) begin
        p_int = p_int * 2 + bsd_value(p_digit);
        if (ndig == 0) first_at = cycles;
        ndig++;
      end
      @(negedge clk);
      cycles++;
    end
    if (p_valid) begin
      p_int = p_int * 2 + bsd_value(p_digit);
      ndig++;
    end
    cycles--;
  endtask

  initial begin
    longint xi, yi, p_int, err;
    int ndig, cycles, first_at;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      for (int i = 0; i < N; i++) begin
        case (t)
          0: begin xd[i] = 1;  yd[i] = 1;  end
          1: begin xd[i] = -1; yd[i] = 1;  end
          2: begin xd[i] = -1; yd[i] = -1; end
          3: begin xd[i] = 0;  yd[i] = 1;  end
          default: begin
            xd[i] = int'($urandom_range(0, 2)) - 1;
            yd[i] = int'($urandom_range(0, 2)) - 1;
          end
        endcase
      end
      xi = 0; yi = 0;
      for (int i = 0; i < N; i++) begin
        xi = xi * 2 + xd[i];
        yi = yi * 2 + yd[i];
      end
      run_one(p_int, ndig, cycles, first_at);
      err = xi * yi - (p_int <<< N);
      if (err < 0) err = -err;
      checks += 4;
      if (ndig != N) begin failures++; $display("digits %0d", ndig); end
      if (cycles != N * N + DELTA) begin failures++; $display("cycles %0d", cycles); end
      if (first_at != 3 * N + 1) begin failures++; $display("first digit at %0d", first_at); end
      if (4 * err > 3 * (longint'(1) <<< N)) begin
        failures++;
        $display("x=%0d y=%0d p=%0d err=%0d", xi, yi, p_int, err);
      end
    end
    // kill
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    repeat (30) @(negedge clk);
    kill = 1;
    @(negedge clk); kill = 0;
    checks++;
    if (busy) failures++;
    repeat (60) begin
      @(negedge clk);
      checks++;
      if (p_valid || done) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
