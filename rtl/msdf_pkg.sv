// msdf_pkg: types and constants shared by the most-significant-digit-first
// (online) arithmetic units.
//
// Digits are radix-2 signed digits (binary signed-digit, BSD) taken from
// {-1, 0, +1}. Each digit is carried as a posibit and a negabit of the same
// weight. The negabit is stored inverted (inverted encoding for negabits), so
// a digit's value is  pos + neg_n - 1 :
//   +1 = {pos=1, neg_n=1},  -1 = {pos=0, neg_n=0},  0 = {0,1} or {1,0}.
// With this encoding plain full and half adders work on negabits unchanged.
// Units in this library emit zero as {0,1}; they accept either encoding.
//
// The micro-instruction type uop_t is the control word that the microcoded
// sequencer (online_ctrl) issues to the shared datapath (online_datapath)
// once per clock. DELTA is the online delay of the serial-parallel
// recurrence that the datapath implements.
package msdf_pkg;

  // Online delay of the serial-parallel multiplication recurrence.
  localparam int DELTA = 2;

  typedef struct packed {
    logic pos;    // posibit
    logic neg_n;  // negabit, inverted encoding
  } bsd_t;

  localparam bsd_t BSD_ZERO = '{pos: 1'b0, neg_n: 1'b1};
  localparam bsd_t BSD_POS  = '{pos: 1'b1, neg_n: 1'b1};
  localparam bsd_t BSD_NEG  = '{pos: 1'b0, neg_n: 1'b0};

  // One control word of the online datapath.
  typedef struct packed {
    logic pp_en;      // add the new partial-product term P(i,j)
    logic ppr_clear;  // feed zero instead of 2*PPR (first column of a row)
    logic ppr_load;   // load the compressor output into PPR
    logic res_load;   // load the compressor output into the residual
    logic res_add;    // feed 2*(residual - Z) into the compressor
    logic sel_en;     // the residual update produces an output digit
    logic last;       // last micro-instruction of the program
  } uop_t;

  localparam uop_t UOP_NOP = '0;

  function automatic bit bsd_is_pos(bsd_t d);
    return d.pos & d.neg_n;
  endfunction

  function automatic bit bsd_is_neg(bsd_t d);
    return ~d.pos & ~d.neg_n;
  endfunction

  function automatic int bsd_value(bsd_t d);
    return int'(d.pos) + int'(d.neg_n) - 1;
  endfunction

  function automatic bsd_t bsd_from_int(int v);
    if (v > 0) return BSD_POS;
    if (v < 0) return BSD_NEG;
    return BSD_ZERO;
  endfunction

endpackage
