// cp_fet -- switch model of one controllable-polarity (double independent
// gate) transistor, with CG/PG stuck-at fault injection.
//
// The polarity gate selects the device type: PG=1 gives an n-type device,
// PG=0 a p-type one. The control gate then turns it on as for an ordinary
// transistor: an n-type device conducts with CG=1, a p-type one with CG=0,
// so the channel conducts exactly when CG equals PG. A fault forces the
// selected gate terminal to a constant before this rule is applied. This
// follows the device behaviour and the fault model of the design; the pass
// strength of the two types is resolved by the enclosing cell (cp_tg_cell).
//
// Interface: cg, pg  gate terminals as wired in the cell
//            flt     fault control (flt.en=0: fault-free)
//            on      channel conducts
//            ntype   device is currently n-type
// Timing: purely combinational.
module cp_fet
  import cp_fault_pkg::*;
(
  input  logic      cg,
  input  logic      pg,
  input  cp_fault_t flt,
  output logic      on,
  output logic      ntype
);

  logic cg_eff, pg_eff;

  always_comb begin
    cg_eff = cg;
    pg_eff = pg;
    if (flt.en) begin
      unique case (flt.kind)
        CG_SA0: cg_eff = 1'b0;
        CG_SA1: cg_eff = 1'b1;
        PG_SA0: pg_eff = 1'b0;
        PG_SA1: pg_eff = 1'b1;
      endcase
    end
    ntype = pg_eff;
    on    = (cg_eff == pg_eff);
  end

endmodule
