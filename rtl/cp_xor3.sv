// cp_xor3 -- three-input XOR gate of four controllable-polarity transistors.
//
// y = a ^ b ^ c. The upper transmission gate passes c_n when a != b, the
// lower one passes c when a == b, as in the published gate schematic; the
// node resolution and fault behaviour come from cp_tg_cell. The same gate
// with c and c_n swapped gives the inverted sum of the adder cell.
//
// Interface: a, a_n, b, b_n, c, c_n  operands and complements
//            flt                     fault controls of t1..t4
//            y, degraded, floating       see cp_tg_cell
// Timing: purely combinational.
module cp_xor3
  import cp_fault_pkg::*;
(
  input  logic           a,
  input  logic           a_n,
  input  logic           b,
  input  logic           b_n,
  input  logic           c,
  input  logic           c_n,
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
    .d_top   (c_n),
    .d_bot   (c),
    .flt     (flt),
    .y       (y),
    .degraded    (degraded),
    .floating(floating)
  );

endmodule
