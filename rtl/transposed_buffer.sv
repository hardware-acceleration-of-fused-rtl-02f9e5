// transposed_buffer: operand buffer stored by digit plane.
//
// Holds K signed-digit operands of n digits each, transposed: word d of the
// memory is digit plane d, i.e. digit d of all K operands side by side.
// One read therefore delivers exactly what one clock of the online inner
// product unit consumes, and no parallel-to-serial converter is needed.
// A producer that itself works most significant digit first (the previous
// layer) naturally writes whole planes, most significant plane first.
// The buffer is read many times per result (every weight plane n times).
//
// Interface: synchronous write of one plane (wr_en, wr_addr, wr_plane);
// asynchronous read (rd_addr -> rd_plane) so that the unit sees the plane in
// the clock its controller names it. An element-wise write port (el_en,
// el_index, el_digits) stores one operand's n digits, for loading operands
// that arrive one by one. A plane write wins over an element write to the
// same word.
module transposed_buffer
  import msdf_pkg::*;
#(
  parameter int N = 8,
  parameter int K = 8,
  localparam int AW = (N > 1) ? $clog2(N) : 1,
  localparam int KW = (K > 1) ? $clog2(K) : 1
) (
  input  logic         clk,
  input  logic         wr_en,
  input  logic [AW-1:0] wr_addr,
  input  bsd_t [K-1:0] wr_plane,
  input  logic         el_en,
  input  logic [KW-1:0] el_index,
  input  bsd_t [N-1:0] el_digits,   // el_digits[0] = most significant digit
  input  logic [AW-1:0] rd_addr,
  output bsd_t [K-1:0] rd_plane
);

  bsd_t [K-1:0] mem [N];

  always_ff @(posedge clk) begin
    for (int d = 0; d < N; d++) begin
      if (wr_en && wr_addr == AW'(d))
        mem[d] <= wr_plane;
      else if (el_en)
        mem[d][el_index] <= el_digits[d];
    end
  end

  assign rd_plane = mem[rd_addr];

endmodule
