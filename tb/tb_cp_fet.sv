// tb_cp_fet -- exhaustive check of the controllable-polarity transistor model.
//
// Applies every (cg, pg) pair with no fault and with each of the four
// gate-terminal stuck-at faults. Expected values come from the device
// truth table written out below: PG=1 n-type conducting on CG=1, PG=0 p-type
// conducting on CG=0, with the faulty terminal replaced by its stuck value.
module tb_cp_fet;
  import cp_fault_pkg::*;

  logic      cg, pg, on, ntype;
  cp_fault_t flt;
  int        checks = 0, failures = 0;

  cp_fet dut (.cg(cg), .pg(pg), .flt(flt), .on(on), .ntype(ntype));

  // Device truth table, indexed {pg, cg}: conducts?
  localparam logic [3:0] ON_TABLE = 4'b1001;  // {11,10,01,00}

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 5; f++) begin
      for (int v = 0; v < 4; v++) begin
        logic ecg, epg;
        cg  = v[0];
        pg  = v[1];
        ecg = cg;
        epg = pg;
        if (f == 0) flt = NO_FAULT;
        else begin
          flt.en   = 1'b1;
          flt.kind = cp_fault_kind_e'(f - 1);
          if (f == 1) ecg = 1'b0;
          if (f == 2) ecg = 1'b1;
          if (f == 3) epg = 1'b0;
          if (f == 4) epg = 1'b1;
        end
        #1;
        checks++;
        if (on !== ON_TABLE[{epg, ecg}] || ntype !== epg) begin
          failures++;
          $display("FAIL fault=%0d cg=%b pg=%b on=%b ntype=%b", f, cg, pg, on, ntype);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
