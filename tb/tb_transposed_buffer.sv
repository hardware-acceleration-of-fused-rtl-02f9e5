// Testbench for transposed_buffer: plane writes, element writes and reads of
// every plane are compared against a reference array of digits.
module tb_transposed_buffer;
  import msdf_pkg::*;
  localparam int N = 8, K = 8;
  logic clk = 0, wr_en = 0, el_en = 0;
  logic [2:0] wr_addr = 0, rd_addr = 0, el_index = 0;
  bsd_t [K-1:0] wr_plane, rd_plane;
  bsd_t [N-1:0] el_digits;
  int ref_d [N][K];
  int checks = 0, failures = 0;

  transposed_buffer #(.N(N), .K(K)) dut (
    .clk(clk), .wr_en(wr_en), .wr_addr(wr_addr), .wr_plane(wr_plane),
    .el_en(el_en), .el_index(el_index), .el_digits(el_digits),
    .rd_addr(rd_addr), .rd_plane(rd_plane)
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int d = 0; d < N; d++) begin
      rd_addr = 3'(d);
      #1;
      for (int k = 0; k < K; k++) begin
        checks++;
        if (bsd_value(rd_plane[k]) != ref_d[d][k]) failures++;
      end
    end
  endtask

  initial begin
    wr_plane = '0;
    el_digits = '0;
    for (int r = 0; r < 20; r++) begin
      // plane writes
      for (int d = 0; d < N; d++) begin
        @(negedge clk);
        wr_en = 1; wr_addr = 3'(d);
        for (int k = 0; k < K; k++) begin
          ref_d[d][k] = int'($urandom_range(0, 2)) - 1;
          wr_plane[k] = bsd_from_int(ref_d[d][k]);
        end
      end
      @(negedge clk); wr_en = 0;
      check_all();
      // element writes
      for (int e = 0; e < 3; e++) begin
        @(negedge clk);
        el_en = 1; el_index = 3'($urandom_range(0, K - 1));
        for (int d = 0; d < N; d++) begin
          ref_d[d][el_index] = int'($urandom_range(0, 2)) - 1;
          el_digits[d] = bsd_from_int(ref_d[d][el_index]);
        end
      end
      @(negedge clk); el_en = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
