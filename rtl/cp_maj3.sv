// cp_maj3 -- three-input majority gate of four controllable-polarity
// transistors; also serves as the TMR voter.
//
// y = MAJ(a, b, c). When a != b the majority equals c, which the upper
// transmission gate passes; when a == b it equals a, which the lower one
// passes. This follows the published gate schematic; node resolution and
// fault behaviour come from cp_tg_cell. Only a and b need complements.
//
// Interface: a, a_n, b, b_n, c  operands and complements of a and b
//            flt                fault controls of t1..t4
//            y, degraded, floating  see cp_tg_cell
// Timing: purely combinational.
module cp_maj3
  import cp_fault_pkg::*;
(
  input  logic           a,
  input  logic           a_n,
  input  logic           b,
  input  logic           b_n,
  input  logic           c,
  input  cp_gate_fault_t flt,
  output logic           y,
  output logic           degraded,
  output logic           floating
);

  cp_tg_cell u_cell (
    .a       (a),
    .a_n     (a_n),
    .b       (b),
    .b_n     (b_n),
    .d_top   (c),
    .d_bot   (a),
    .flt     (flt),
    .y       (y),
    .degraded    (degraded),
    .floating(floating)
  );

endmodule
