// cp_tg_cell -- logic-level model of the four-transistor cell from which every
// XOR and MAJ gate of the adder is built.
//
// Two transmission gates share one output node. The upper one (t1, t2) passes
// d_top and is on when a != b; the lower one (t3, t4) passes d_bot and is on
// when a == b. Each transistor is a cp_fet whose gates are driven as follows
// (CG, PG):  t1 (b_n, a)   t2 (b, a_n)   t3 (b, a)   t4 (b_n, a_n).
// With true complements exactly one transmission gate conducts and both of
// its devices are on, so the cell is fault-free full swing. The control
// signals per transistor are those of the published gate schematics; which
// of each pair is CG and which PG is the assignment that reproduces the
// published fault tables.
//
// Under a fault, more or fewer devices may conduct. The node is resolved with
// a pass-strength rule: an n-type device passes 0 strongly and 1 weakly, a
// p-type device passes 1 strongly and 0 weakly. If only one value is driven,
// the node takes it. If both are driven, a strong 0 wins, else a strong 1,
// else 0. This rule is this design's; it classifies the published
// fault-table voltages (logic 1 above 0.600 V, logic 0 below 0.540 V)
// correctly. A node with no conducting device reads 0 (design choice).
//
// Interface: a, a_n, b, b_n  control operands and their complements (kept
//                            separate so that inconsistent complements from
//                            a faulty driver are modelled)
//            d_top, d_bot    data passed by the upper / lower gate
//            flt             fault controls of t1..t4
//            y               logic value of the output node
//            degraded            reduced noise margin: contention, or the value is
//                            only driven weakly (a masked fault)
//            floating        no device drives the node
// Timing: purely combinational.
module cp_tg_cell
  import cp_fault_pkg::*;
(
  input  logic           a,
  input  logic           a_n,
  input  logic           b,
  input  logic           b_n,
  input  logic           d_top,
  input  logic           d_bot,
  input  cp_gate_fault_t flt,
  output logic           y,
  output logic           degraded,
  output logic           floating
);

  logic [3:0] cg, pg, on, ntype, data;

  assign cg   = {b_n, b, b, b_n};      // t4 t3 t2 t1
  assign pg   = {a_n, a, a_n, a};
  assign data = {d_bot, d_bot, d_top, d_top};

  for (genvar t = 0; t < 4; t++) begin : g_fet
    cp_fet u_fet (
      .cg   (cg[t]),
      .pg   (pg[t]),
      .flt  (flt[t]),
      .on   (on[t]),
      .ntype(ntype[t])
    );
  end

  // Per device: drives 0 / drives 1, strongly or weakly.
  logic [3:0] drv0, drv1, hard0, hard1;
  assign drv0    = on & ~data;
  assign drv1    = on &  data;
  assign hard0 = drv0 &  ntype;
  assign hard1 = drv1 & ~ntype;

  always_comb begin
    if (|drv0 && |drv1) begin
      y    = (|hard0) ? 1'b0 : ((|hard1) ? 1'b1 : 1'b0);
      degraded = 1'b1;
    end else if (|drv1) begin
      y    = 1'b1;
      degraded = ~|hard1;
    end else begin
      y    = 1'b0;
      degraded = |drv0 && ~|hard0;
    end
    floating = ~|on;
  end

endmodule
