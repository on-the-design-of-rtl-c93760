// ft_adder_stage -- fault-tolerant one-bit adder: triple modular redundancy of
// the cp_full_adder cell with permuted inputs and majority-gate voters
// (3 x 16 + 3 x 4 = 60 transistors).
//
// Three replicas of the adder cell compute the same bit, each with its
// operands on different ports: replica 1 takes (a, b, c) on its (A, B, Cin)
// ports, replica 2 (c, a, b) and replica 3 (b, c, a). Sum and carry are
// symmetric, so the results agree, but one transistor fault lands on a
// different operand combination in every replica, so one fault type present
// in several replicas does not become a common-mode error. Three cp_maj3
// voters vote the sum, the carry and the inverted carry; the voter of a
// signal uses the replicas' complementary outputs (s_n, co_n, co) as its
// inverted controls. A fault-free voter only ever sees 000 or 111 when at
// most one replica is faulty, a pattern the majority cell handles under any
// single fault, so a single fault anywhere in the stage never reaches s, co
// or co_n. The replica permutation follows the published stage diagram; the
// order in which the replicas reach the voter ports (1, 2, 3 on A, B, Cin)
// is this design's choice.
//
// Faults: NF slots, each naming a unit (0..2 replica, 3 voters), a gate, a
// transistor and a fault kind. The first enabled slot that names a
// transistor wins. The enclosing adder selects which slots reach a stage.
//
// Interface: a, a_n, b, b_n, c, c_n  operand bits, carry in, complements
//            flt[NF]                 fault slots for this stage
//            s, co, co_n             voted outputs
//            degraded, floating          OR of the node flags of all 15 gates
// Timing: purely combinational.
//
// The inverted sum of replica 3 is produced but not used: a majority cell
// needs the complements of its first two inputs only. It is kept so that all
// three replicas are the same 16-transistor cell.
module ft_adder_stage
  import cp_fault_pkg::*;
#(
  parameter int unsigned NF = 2
) (
  input  logic         a,
  input  logic         a_n,
  input  logic         b,
  input  logic         b_n,
  input  logic         c,
  input  logic         c_n,
  input  stage_fault_t flt [NF],
  output logic         s,
  output logic         co,
  output logic         co_n,
  output logic         degraded,
  output logic         floating
);

  // Per unit (3 replicas + voters), per gate, per transistor fault control.
  cp_gate_fault_t [3:0] gflt [4];

  always_comb begin
    for (int u = 0; u < 4; u++) begin
      gflt[u] = '0;
      for (int g = 0; g < 4; g++) begin
        for (int t = 0; t < 4; t++) begin
          for (int k = NF - 1; k >= 0; k--) begin
            if (flt[k].en && flt[k].unit == 2'(u) && flt[k].gate == 2'(g)
                && flt[k].fet == 2'(t)) begin
              gflt[u][g][t] = '{en: 1'b1, kind: flt[k].kind};
            end
          end
        end
      end
    end
  end

  // Replica port operands, (A, B, Cin) of each replica.
  logic [2:0] pa, pa_n, pb, pb_n, pc, pc_n;
  assign pa   = {b,   c,   a  };
  assign pa_n = {b_n, c_n, a_n};
  assign pb   = {c,   a,   b  };
  assign pb_n = {c_n, a_n, b_n};
  assign pc   = {a,   b,   c  };
  assign pc_n = {a_n, b_n, c_n};

  logic [2:0] rs, rs_n, rco, rco_n, rdg, rfl;

  for (genvar r = 0; r < NUM_REPLICAS; r++) begin : g_rep
    cp_full_adder u_add (
      .a       (pa[r]),
      .a_n     (pa_n[r]),
      .b       (pb[r]),
      .b_n     (pb_n[r]),
      .c       (pc[r]),
      .c_n     (pc_n[r]),
      .flt     (gflt[r]),
      .s       (rs[r]),
      .s_n     (rs_n[r]),
      .co      (rco[r]),
      .co_n    (rco_n[r]),
      .degraded    (rdg[r]),
      .floating(rfl[r])
    );
  end

  logic [2:0] vdg, vfl;

  cp_maj3 u_vote_s (
    .a(rs[0]), .a_n(rs_n[0]), .b(rs[1]), .b_n(rs_n[1]), .c(rs[2]),
    .flt(gflt[UNIT_VOTER][VOTE_S]), .y(s), .degraded(vdg[VOTE_S]), .floating(vfl[VOTE_S])
  );

  cp_maj3 u_vote_co (
    .a(rco[0]), .a_n(rco_n[0]), .b(rco[1]), .b_n(rco_n[1]), .c(rco[2]),
    .flt(gflt[UNIT_VOTER][VOTE_CO]), .y(co), .degraded(vdg[VOTE_CO]), .floating(vfl[VOTE_CO])
  );

  cp_maj3 u_vote_co_n (
    .a(rco_n[0]), .a_n(rco[0]), .b(rco_n[1]), .b_n(rco[1]), .c(rco_n[2]),
    .flt(gflt[UNIT_VOTER][VOTE_CO_N]), .y(co_n), .degraded(vdg[VOTE_CO_N]),
    .floating(vfl[VOTE_CO_N])
  );

  assign degraded     = |{rdg, vdg};
  assign floating = |{rfl, vfl};

endmodule
