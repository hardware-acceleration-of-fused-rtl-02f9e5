// fused_layer_pair: two convolutional layers fused at digit level, with
// backward early termination.
//
// Layer 1 is an array of K2 fused elements (fused_pe: convolution of K1
// terms, ReLU, MaxPool of M pixels). Each produces one pooled activation of
// layer 2, most significant digit first. Layer 2 is one online inner product
// unit of K2 terms followed by an online ReLU: it computes one output pixel
// of the second layer from the K2 layer-1 results and its own kernel.
//
// Digit-level pipelining: the layer-1 digits are written, as they appear,
// into a K2-wide digit-plane store (digit d of every layer-1 result in
// plane d). Row i of the layer-2 program needs only plane i, so layer 2
// starts as soon as the first layer-1 digit is stored, 3*N clocks after
// start, and then trails layer 1 by that amount: layer-1 digit d (d <= N-2)
// appears at clock (d+2)*N and row d-1 of layer 2 starts at clock
// (d+2)*N + 1; the last two digits come even earlier. A pair therefore
// finishes 3*N + 1 + N*N + 2 clocks after start (91 for N = 8) instead of
// twice N*N + 2 plus a transfer when the layers run one after the other.
//
// Backward termination: as soon as the layer-2 ReLU sees a negative leading
// digit, the layer-2 result is 0 and every layer-1 element still running is
// killed, together with layer 2. kill_in (from a further layer) does the
// same. Layer-1 elements that stopped on their own leave the remaining
// digits of their column at 0 (the store is cleared at start), which is the
// value they stand for.
//
// Interface: layer-1 operands are loaded through wr_* exactly as for one
// fused_pe, with wr_pe choosing the element; the layer-2 kernel through
// w2_wr_* (one digit plane of K2 weights per write). Pulse start while idle.
// out_digit/out_valid: rectified layer-2 result 2^-L2 * max(0, sum_k a_k w_k)
// (L2 = clog2 K2; a_k = layer-1 results as emitted), at most N digits. done
// pulses after a complete run, stopped_early (one clock) instead in the clock
// after a kill.
// l1_busy shows which layer-1 elements are still computing. The counters
// accumulate over runs: backward kills (layer 2 negative while layer 1 was
// still running), and, summed over the layer-1 elements, pixels stopped by
// ReLU, pixels stopped by MaxPool and elements that stopped on their own
// (every pixel negative) rather than by a kill.
//
// From the scheme: digit-level chaining of successive layers, and stopping
// all work of the earlier layer (conv, ReLU, and here also MaxPool) once
// the later layer's ReLU output is known negative. The defaults are the
// first two LeNet-5 convolutions (5x5 kernels, 6 layer-1 channels, 2x2
// pooling, 8-digit operands). This design's own choices: one element per
// layer-1 output (overlapping layer-2 pixels would recompute shared layer-1
// outputs), the plane store, the 3*N start offset, the 2^-clog2(K) scaling
// of each inner product and the kill wiring.
module fused_layer_pair
  import msdf_pkg::*;
#(
  parameter int N  = 8,
  parameter int K1 = 25,
  parameter int M  = 4,
  parameter int K2 = 150,
  localparam int AW = (N > 1) ? $clog2(N) : 1,
  localparam int BW = $clog2(M + 1),
  localparam int PW = (K2 > 1) ? $clog2(K2) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // layer-1 operand loading
  input  logic          wr_en,
  input  logic [PW-1:0] wr_pe,
  input  logic [BW-1:0] wr_buf,
  input  logic [AW-1:0] wr_addr,
  input  bsd_t [K1-1:0] wr_plane,
  // layer-2 kernel loading
  input  logic          w2_wr_en,
  input  logic [AW-1:0] w2_wr_addr,
  input  bsd_t [K2-1:0] w2_wr_plane,
  // run control
  input  logic          start,
  input  logic          kill_in,
  output logic          busy,
  output logic          done,
  output logic          stopped_early,
  // layer-2 result stream
  output logic          out_valid,
  output bsd_t          out_digit,
  // status
  output logic [K2-1:0] l1_busy,
  output logic [15:0]   cnt_backward_kill,
  output logic [31:0]   cnt_l1_relu_stop,
  output logic [31:0]   cnt_l1_pool_stop,
  output logic [31:0]   cnt_l1_early_stop
);

  // Clock (counted from the first clock after start) in which the first
  // layer-1 digit is stored; layer 2 is started in it.
  localparam int L2_START = 3 * N;
  localparam int CW       = $clog2(L2_START + 2);

  logic          run_q, started2_q, stopped_q, relu2_neg, relu2_pos;
  logic [CW-1:0] cyc_q;
  logic          kill_all, start2, clear_store;

  // layer-1 side
  logic [K2-1:0] l1_valid, l1_done, l1_early;
  bsd_t [K2-1:0] l1_digit;
  logic [AW:0]   dcnt_q [K2];
  bsd_t [K2-1:0] act2_q [N];

  // layer-2 side
  uop_t          uop2;
  logic [AW-1:0] a2_idx, b2_idx;
  logic [$clog2(N*N+DELTA)-1:0] step2;
  logic          busy2, done2, killed2, ipu2_valid, relu2_valid;
  bsd_t          ipu2_digit;
  bsd_t [K2-1:0] w2_plane;

  assign clear_store = start && !busy;
  assign kill_all    = busy && (relu2_neg || kill_in);
  assign start2      = run_q && !started2_q && (cyc_q == CW'(L2_START)) && !kill_all;

  logic [15:0]   c_relu [K2], c_pool [K2], c_early [K2], c_kill [K2];

  // Layer-1 statistics, summed over the elements (cumulative over runs).
  always_comb begin
    cnt_l1_relu_stop  = '0;
    cnt_l1_pool_stop  = '0;
    cnt_l1_early_stop = '0;
    for (int p = 0; p < K2; p++) begin
      cnt_l1_relu_stop  = cnt_l1_relu_stop + 32'(c_relu[p]);
      cnt_l1_pool_stop  = cnt_l1_pool_stop + 32'(c_pool[p]);
      cnt_l1_early_stop = cnt_l1_early_stop + 32'(c_early[p] - c_kill[p]);
    end
  end

  for (genvar p = 0; p < K2; p++) begin : g_l1
    logic [M-1:0]  live_unused;
    logic [31:0]   c_skip_unused;

    fused_pe #(.N(N), .K(K1), .M(M)) u_pe (
      .clk(clk), .rst_n(rst_n),
      .wr_en(wr_en && wr_pe == PW'(p)), .wr_buf(wr_buf), .wr_addr(wr_addr),
      .wr_plane(wr_plane),
      .start(clear_store), .kill_in(kill_all), .busy(l1_busy[p]),
      .done(l1_done[p]), .stopped_early(l1_early[p]),
      .out_valid(l1_valid[p]), .out_digit(l1_digit[p]), .unit_live(live_unused),
      .cnt_relu_stop(c_relu[p]), .cnt_pool_stop(c_pool[p]),
      .cnt_early_stop(c_early[p]), .cnt_kill(c_kill[p]),
      .cnt_skipped_unit_cycles(c_skip_unused)
    );

    // Store each emitted digit in the plane of its position.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        dcnt_q[p] <= '0;
      end else if (clear_store) begin
        dcnt_q[p] <= '0;
      end else if (l1_valid[p] && dcnt_q[p] < (AW+1)'(N)) begin
        dcnt_q[p] <= dcnt_q[p] + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < N; d++) act2_q[d] <= {K2{BSD_ZERO}};
    end else if (clear_store) begin
      for (int d = 0; d < N; d++) act2_q[d] <= {K2{BSD_ZERO}};
    end else begin
      for (int p = 0; p < K2; p++)
        if (l1_valid[p] && dcnt_q[p] < (AW+1)'(N))
          act2_q[dcnt_q[p][AW-1:0]][p] <= l1_digit[p];
    end
  end

  // Run bookkeeping.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q             <= 1'b0;
      started2_q        <= 1'b0;
      cyc_q             <= '0;
      cnt_backward_kill <= '0;
      stopped_q         <= 1'b0;
    end else begin
      stopped_q <= kill_all;
      if (clear_store) begin
        run_q      <= 1'b1;
        started2_q <= 1'b0;
        cyc_q      <= '0;
      end else if (run_q) begin
        if (cyc_q != CW'(L2_START + 1)) cyc_q <= cyc_q + 1'b1;
        if (start2) started2_q <= 1'b1;
        if (kill_all || done2) run_q <= 1'b0;
      end
      if (kill_all && relu2_neg && (|l1_busy))
        cnt_backward_kill <= cnt_backward_kill + 16'd1;
    end
  end

  assign busy          = run_q;
  assign done          = done2;
  assign stopped_early = stopped_q;

  // Layer 2.
  online_ctrl #(.N(N)) u_ctrl2 (
    .clk(clk), .rst_n(rst_n), .start(start2), .kill(kill_all),
    .busy(busy2), .uop(uop2), .a_idx(a2_idx), .b_idx(b2_idx), .step(step2),
    .done(done2), .killed(killed2)
  );

  transposed_buffer #(.N(N), .K(K2)) u_w2buf (
    .clk(clk), .wr_en(w2_wr_en), .wr_addr(w2_wr_addr), .wr_plane(w2_wr_plane),
    .el_en(1'b0), .el_index('0), .el_digits('0),
    .rd_addr(b2_idx), .rd_plane(w2_plane)
  );

  online_ipu #(.N(N), .K(K2)) u_ipu2 (
    .clk(clk), .rst_n(rst_n), .en(busy2), .uop(uop2),
    .a_plane(act2_q[a2_idx]), .b_plane(w2_plane),
    .digit(ipu2_digit), .digit_valid(ipu2_valid)
  );

  online_relu u_relu2 (
    .clk(clk), .rst_n(rst_n), .clear(clear_store),
    .in_valid(ipu2_valid), .in_digit(ipu2_digit),
    .out_valid(relu2_valid), .out_digit(out_digit),
    .terminate(relu2_neg), .positive(relu2_pos)
  );

  assign out_valid = relu2_valid && !kill_all;

endmodule
