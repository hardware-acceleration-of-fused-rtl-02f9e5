// fused_pe: fused convolution + ReLU + MaxPool processing element with
// digit-level early termination.
//
// The element evaluates one pooling window of a convolutional layer: M
// neighbouring output pixels (M = 4 for 2x2 pooling), each a K-term inner
// product of its own activation window with a shared kernel, then ReLU, then
// the maximum of the M results. All M inner product units (online_ipu) run
// in lock-step from one microcoded sequencer (online_ctrl) and read the same
// kernel digit plane from one shared transposed weight buffer; each has its
// own transposed activation buffer. Their digits flow, most significant
// first, straight into per-pixel online ReLU units and one online MaxPool
// unit, with no intermediate storage.
//
// Early termination: a unit is stopped (its registers frozen) as soon as
//   - its ReLU has seen a negative leading digit (its result is 0), or
//   - the MaxPool has found it below another pixel of the window.
// When no unit is left running, or when a consumer further down a fused
// chain asserts kill_in (its own result has become irrelevant), the whole
// element stops at once; the output digits not yet sent are then 0.
//
// Interface: load operands with wr_en/wr_buf/wr_addr/wr_plane, one digit
// plane of K operands per write (wr_buf < M: activation buffer of pixel
// wr_buf; wr_buf = M: kernel). Pulse start. out_digit/out_valid carry the
// pooled, rectified result 2^-L * max(0, max_m sum_k A_mk B_k) (L =
// clog2 K), most significant digit first, at most N digits. done pulses
// after a complete run (N*N+2 clocks), stopped_early instead when it ended
// early. The counters accumulate over runs: how many pixels ReLU stopped,
// how many MaxPool stopped, how many runs ended early, how many were killed
// from downstream, and how many unit-clocks were skipped in all.
module fused_pe
  import msdf_pkg::*;
#(
  parameter int N = 8,
  parameter int K = 256,
  parameter int M = 4,
  localparam int AW = (N > 1) ? $clog2(N) : 1,
  localparam int BW = $clog2(M + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  // operand loading
  input  logic         wr_en,
  input  logic [BW-1:0] wr_buf,
  input  logic [AW-1:0] wr_addr,
  input  bsd_t [K-1:0] wr_plane,
  // run control
  input  logic         start,
  input  logic         kill_in,
  output logic         busy,
  output logic         done,
  output logic         stopped_early,
  // result stream
  output logic         out_valid,
  output bsd_t         out_digit,
  output logic [M-1:0] unit_live,
  // statistics
  output logic [15:0]  cnt_relu_stop,
  output logic [15:0]  cnt_pool_stop,
  output logic [15:0]  cnt_early_stop,
  output logic [15:0]  cnt_kill,
  output logic [31:0]  cnt_skipped_unit_cycles
);

  localparam int NSTEPS = N * N + DELTA;
  localparam int SW     = $clog2(NSTEPS);

  uop_t          uop;
  logic [AW-1:0] a_idx, b_idx;
  logic [SW-1:0] step;
  logic          ctrl_done, ctrl_killed, ctrl_kill;
  logic          slot_q, killed_q;

  bsd_t [K-1:0]  w_plane;
  bsd_t [K-1:0]  a_plane [M];
  bsd_t [M-1:0]  ipu_digit, relu_digit;
  logic [M-1:0]  ipu_valid, relu_valid, relu_neg, relu_pos, pool_eff, pool_term;
  logic [M-1:0]  relu_neg_q, pool_term_q;

  online_ctrl #(.N(N)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .kill(ctrl_kill),
    .busy(busy), .uop(uop), .a_idx(a_idx), .b_idx(b_idx), .step(step),
    .done(ctrl_done), .killed(ctrl_killed)
  );

  transposed_buffer #(.N(N), .K(K)) u_wbuf (
    .clk(clk), .wr_en(wr_en && wr_buf == BW'(M)), .wr_addr(wr_addr),
    .wr_plane(wr_plane), .el_en(1'b0), .el_index('0), .el_digits('0),
    .rd_addr(b_idx), .rd_plane(w_plane)
  );

  for (genvar m = 0; m < M; m++) begin : g_pix
    transposed_buffer #(.N(N), .K(K)) u_abuf (
      .clk(clk), .wr_en(wr_en && wr_buf == BW'(m)), .wr_addr(wr_addr),
      .wr_plane(wr_plane), .el_en(1'b0), .el_index('0), .el_digits('0),
      .rd_addr(a_idx), .rd_plane(a_plane[m])
    );

    online_ipu #(.N(N), .K(K)) u_ipu (
      .clk(clk), .rst_n(rst_n), .en(busy && unit_live[m]), .uop(uop),
      .a_plane(a_plane[m]), .b_plane(w_plane),
      .digit(ipu_digit[m]), .digit_valid(ipu_valid[m])
    );

    online_relu u_relu (
      .clk(clk), .rst_n(rst_n), .clear(start && !busy),
      .in_valid(slot_q && pool_eff[m]), .in_digit(ipu_digit[m]),
      .out_valid(relu_valid[m]), .out_digit(relu_digit[m]),
      .terminate(relu_neg[m]), .positive(relu_pos[m])
    );
  end

  online_maxpool #(.M(M)) u_pool (
    .clk(clk), .rst_n(rst_n), .clear(start && !busy),
    .in_valid(slot_q), .in_digit(relu_digit),
    .out_valid(out_valid), .out_digit(out_digit),
    .effective(pool_eff), .terminate(pool_term)
  );

  assign unit_live = ~relu_neg & pool_eff;
  assign ctrl_kill = kill_in || (unit_live == '0);
  assign done      = ctrl_done;

  // Digit slot: the clock in which every running unit shows a new digit.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) slot_q <= 1'b0;
    else        slot_q <= busy && uop.res_load && uop.sel_en && !ctrl_kill;
  end

  // Statistics.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_relu_stop           <= '0;
      cnt_pool_stop           <= '0;
      cnt_early_stop          <= '0;
      cnt_kill                <= '0;
      cnt_skipped_unit_cycles <= '0;
      relu_neg_q              <= '0;
      pool_term_q             <= '0;
      killed_q                <= 1'b0;
    end else begin
      relu_neg_q  <= relu_neg;
      pool_term_q <= pool_term;
      killed_q    <= ctrl_killed;
      if (start && !busy) begin
        relu_neg_q  <= '0;
        pool_term_q <= '0;
      end
      cnt_relu_stop <= cnt_relu_stop + 16'($countones(relu_neg & ~relu_neg_q));
      cnt_pool_stop <= cnt_pool_stop + 16'($countones(pool_term & ~pool_term_q));
      if (busy && ctrl_kill) begin
        cnt_early_stop <= cnt_early_stop + 16'd1;
        if (kill_in) cnt_kill <= cnt_kill + 16'd1;
        // every unit skips the rest of the program
        cnt_skipped_unit_cycles <= cnt_skipped_unit_cycles
                                 + 32'(M) * 32'(NSTEPS - 32'(step));
      end else if (busy) begin
        cnt_skipped_unit_cycles <= cnt_skipped_unit_cycles
                                 + 32'($countones(~unit_live));
      end
    end
  end

  assign stopped_early = ctrl_killed && !killed_q;

endmodule
