// msdf_accel: top level of the most-significant-digit-first CNN accelerator.
//
// Two independent engines stand side by side:
//   - fused_layer_pair: two convolutional layers fused at digit level, sized
//     for LeNet-5 layers 1 and 2 (150 layer-1 elements, each a 25-term
//     convolution with ReLU and 2x2 MaxPool, feeding a 150-term layer-2
//     inner product with ReLU; n = 8 digit operands), with early
//     termination inside layer 1 and from layer 2 back into layer 1.
//     Operands are loaded through this top; the layer-2 result leaves as a
//     digit stream.
//   - online_multiplier: the stand-alone utilization-balanced online
//     multiplier (n = 8). It reads its operands from an external buffer
//     through the x_idx/y_idx digit addresses.
// Everything is clocked by clk and reset by the active-low asynchronous
// rst_n. See the two modules for timing.
module msdf_accel
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
  // fused layer pair
  input  logic          fl_wr_en,
  input  logic [PW-1:0] fl_wr_pe,
  input  logic [BW-1:0] fl_wr_buf,
  input  logic [AW-1:0] fl_wr_addr,
  input  bsd_t [K1-1:0] fl_wr_plane,
  input  logic          fl_w2_wr_en,
  input  logic [AW-1:0] fl_w2_wr_addr,
  input  bsd_t [K2-1:0] fl_w2_wr_plane,
  input  logic          fl_start,
  input  logic          fl_kill_in,
  output logic          fl_busy,
  output logic          fl_done,
  output logic          fl_stopped_early,
  output logic          fl_out_valid,
  output bsd_t          fl_out_digit,
  output logic [K2-1:0] fl_l1_busy,
  output logic [15:0]   fl_cnt_backward_kill,
  output logic [31:0]   fl_cnt_l1_relu_stop,
  output logic [31:0]   fl_cnt_l1_pool_stop,
  output logic [31:0]   fl_cnt_l1_early_stop,
  // online multiplier
  input  logic          mul_start,
  input  logic          mul_kill,
  output logic [AW-1:0] mul_x_idx,
  output logic [AW-1:0] mul_y_idx,
  input  bsd_t          mul_x_digit,
  input  bsd_t          mul_y_digit,
  output bsd_t          mul_p_digit,
  output logic          mul_p_valid,
  output logic          mul_busy,
  output logic          mul_done
);

  fused_layer_pair #(.N(N), .K1(K1), .M(M), .K2(K2)) u_pair (
    .clk(clk), .rst_n(rst_n),
    .wr_en(fl_wr_en), .wr_pe(fl_wr_pe), .wr_buf(fl_wr_buf),
    .wr_addr(fl_wr_addr), .wr_plane(fl_wr_plane),
    .w2_wr_en(fl_w2_wr_en), .w2_wr_addr(fl_w2_wr_addr),
    .w2_wr_plane(fl_w2_wr_plane),
    .start(fl_start), .kill_in(fl_kill_in), .busy(fl_busy), .done(fl_done),
    .stopped_early(fl_stopped_early),
    .out_valid(fl_out_valid), .out_digit(fl_out_digit),
    .l1_busy(fl_l1_busy), .cnt_backward_kill(fl_cnt_backward_kill),
    .cnt_l1_relu_stop(fl_cnt_l1_relu_stop),
    .cnt_l1_pool_stop(fl_cnt_l1_pool_stop),
    .cnt_l1_early_stop(fl_cnt_l1_early_stop)
  );

  online_multiplier #(.N(N)) u_mul (
    .clk(clk), .rst_n(rst_n), .start(mul_start), .kill(mul_kill),
    .x_idx(mul_x_idx), .y_idx(mul_y_idx),
    .x_digit(mul_x_digit), .y_digit(mul_y_digit),
    .p_digit(mul_p_digit), .p_valid(mul_p_valid),
    .busy(mul_busy), .done(mul_done)
  );

endmodule
