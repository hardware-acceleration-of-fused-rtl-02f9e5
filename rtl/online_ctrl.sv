// online_ctrl: microcoded sequencer of the online multiplier and inner
// product unit.
//
// One multiplication (or inner product) of n-digit operands is a program of
// n*n + DELTA micro-instructions, one per clock:
//   row i = 0..n-1, column j = 0..n-1 (n clocks per row):
//     j = 0      PPR <- P(i,0)                       (PPR input muxed to 0)
//     0 < j < n-1 PPR <- 2*PPR + P(i,j)
//     j = n-1    residual <- 2*(residual - Z) + 2*PPR + P(i,n-1)
//                (no residual term in row 0; a digit is selected from row
//                 DELTA on, the rows before it are the online delay)
//   then DELTA flush steps: residual <- 2*(residual - Z), digit selected.
// Every row therefore ends with one residual update, and the n output digits
// leave at the ends of rows DELTA..n-1 and in the DELTA flush steps. With
// n = 8 a result takes 66 clocks.
// The program is a constant ROM computed at elaboration; each word holds the
// operand digit addresses (a_idx selects digit i of the A operands, b_idx
// digit j of the B operands) and the datapath control word.
//
// Interface: start (while idle) begins the program in the next clock; the
// micro-instruction of the current clock is on uop/a_idx/b_idx while busy.
// done pulses in the clock after the last micro-instruction. kill aborts the
// program at once (early termination) and raises killed until next start.
module online_ctrl
  import msdf_pkg::*;
#(
  parameter int N = 8,
  localparam int IW = (N > 1) ? $clog2(N) : 1,
  localparam int SW = $clog2(N * N + DELTA)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  kill,
  output logic                  busy,
  output uop_t                  uop,
  output logic [IW-1:0]         a_idx,
  output logic [IW-1:0]         b_idx,
  output logic [SW-1:0]         step,
  output logic                  done,
  output logic                  killed
);

  localparam int NSTEPS = N * N + DELTA;
  localparam int UW     = $bits(uop_t);
  localparam int EW     = 2 * IW + UW;

  function automatic logic [NSTEPS*EW-1:0] build_rom();
    logic [NSTEPS*EW-1:0] rom;
    uop_t u;
    int   r, c;
    rom = '0;
    for (int s = 0; s < NSTEPS; s++) begin
      u = UOP_NOP;
      if (s < N * N) begin
        r = s / N;
        c = s % N;
        u.pp_en     = 1'b1;
        u.ppr_clear = (c == 0);
        u.ppr_load  = (c != N - 1);
        u.res_load  = (c == N - 1);
        u.res_add   = (c == N - 1) && (r > 0);
        u.sel_en    = (c == N - 1) && (r >= DELTA);
      end else begin
        r = 0;
        c = 0;
        u.ppr_clear = 1'b1;
        u.res_load  = 1'b1;
        u.res_add   = 1'b1;
        u.sel_en    = 1'b1;
      end
      u.last = (s == NSTEPS - 1);
      rom[s*EW +: EW] = {IW'(r), IW'(c), u};
    end
    return rom;
  endfunction

  localparam logic [NSTEPS*EW-1:0] UCODE = build_rom();

  logic [SW-1:0] upc;
  logic [EW-1:0] word;

  always_comb begin
    word = UCODE[upc*EW +: EW];
    if (busy) begin
      {a_idx, b_idx, uop} = word;
    end else begin
      a_idx = '0;
      b_idx = '0;
      uop   = UOP_NOP;
    end
  end

  assign step = upc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      upc    <= '0;
      done   <= 1'b0;
      killed <= 1'b0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        if (kill) begin
          busy   <= 1'b0;
          killed <= 1'b1;
          upc    <= '0;
        end else if (uop.last) begin
          busy <= 1'b0;
          done <= 1'b1;
          upc  <= '0;
        end else begin
          upc <= upc + SW'(1);
        end
      end else if (start) begin
        busy   <= 1'b1;
        killed <= 1'b0;
        upc    <= '0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) busy |-> upc < SW'(NSTEPS));

endmodule
