// cp_full_adder -- one-bit full adder of four controllable-polarity gates
// (16 transistors) that delivers sum, carry and both complements in a single
// logic level, so that adder stages can be chained without inverters.
//
// All four gates share the same transistor controls (a, a_n, b, b_n) and
// differ only in the data their transmission gates pass (upper / lower):
//   s     XOR cell   c_n / c
//   s_n   XOR cell   c   / c_n     (XOR with the carry-in complement)
//   co    MAJ cell   c   / a
//   co_n  MAJ cell   c_n / a_n     (MAJ with complemented data)
// This is the published cell. Because s and s_n (co and co_n) come from
// separate gates, a fault in one gate can leave them non-complementary;
// downstream gates see that, as they would in silicon.
//
// Interface: a, a_n, b, b_n, c, c_n  operands, carry in, complements
//            flt[g][t]               fault control, gate g (GATE_* order),
//                                    transistor t1..t4 = 0..3
//            s, s_n, co, co_n        outputs
//            degraded, floating          OR of the flags of the four gates
// Timing: purely combinational.
module cp_full_adder
  import cp_fault_pkg::*;
(
  input  logic                 a,
  input  logic                 a_n,
  input  logic                 b,
  input  logic                 b_n,
  input  logic                 c,
  input  logic                 c_n,
  input  cp_gate_fault_t [3:0] flt,
  output logic                 s,
  output logic                 s_n,
  output logic                 co,
  output logic                 co_n,
  output logic                 degraded,
  output logic                 floating
);

  logic [3:0] dg, fl;

  cp_xor3 u_sum (
    .a(a), .a_n(a_n), .b(b), .b_n(b_n), .c(c), .c_n(c_n),
    .flt(flt[GATE_S]), .y(s), .degraded(dg[GATE_S]), .floating(fl[GATE_S])
  );

  cp_xor3 u_sum_n (
    .a(a), .a_n(a_n), .b(b), .b_n(b_n), .c(c_n), .c_n(c),
    .flt(flt[GATE_S_N]), .y(s_n), .degraded(dg[GATE_S_N]), .floating(fl[GATE_S_N])
  );

  cp_maj3 u_carry (
    .a(a), .a_n(a_n), .b(b), .b_n(b_n), .c(c),
    .flt(flt[GATE_CO]), .y(co), .degraded(dg[GATE_CO]), .floating(fl[GATE_CO])
  );

  // Inverted carry: the MAJ cell with its controls unchanged and its data
  // complemented, hence the bare cell rather than cp_maj3.
  cp_tg_cell u_carry_n (
    .a(a), .a_n(a_n), .b(b), .b_n(b_n), .d_top(c_n), .d_bot(a_n),
    .flt(flt[GATE_CO_N]), .y(co_n), .degraded(dg[GATE_CO_N]), .floating(fl[GATE_CO_N])
  );

  assign degraded     = |dg;
  assign floating = |fl;

endmodule
