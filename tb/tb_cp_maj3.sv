// tb_cp_maj3 -- checks the three-input majority gate against its published
// fault characterisation.
//
// Applies the 8 input vectors fault-free and with each of the 16 single
// CG/PG faults. The expected logic value is MAJ(a, b, c), inverted where the
// characterisation shows a wrong output level. Where the characterised
// output is off the rail the degraded flag must be set. Also checks that
// the gate never fails on 000 and 111, the only vectors a voter sees when
// its inputs agree. Rows are indexed {a, b, c}; bit t*4 + kind of a mask is
// the fault of transistor t.
module tb_cp_maj3;
  import cp_fault_pkg::*;

  logic a, b, c, y, degraded, floating;
  cp_gate_fault_t flt;
  int checks = 0, failures = 0;
  logic hit;
  int n_det;

  cp_maj3 dut (.a(a), .a_n(~a), .b(b), .b_n(~b), .c(c), .flt(flt),
               .y(y), .degraded(degraded), .floating(floating));

  localparam logic [15:0] FAULTY [8] = '{
    16'h0000, 16'h0000, 16'h0000, 16'h2800, 16'h0000, 16'h0000, 16'h0082, 16'h0000};
  localparam logic [15:0] OFFRAIL [8] = '{
    16'h0000, 16'h5069, 16'h0000, 16'h690a, 16'h9605, 16'h0000, 16'ha096, 16'h0000};

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_det = 0;
    for (int f = -1; f < 16; f++) begin
      hit = 1'b0;
      flt = '0;
      if (f >= 0) flt[f / 4] = '{en: 1'b1, kind: cp_fault_kind_e'(f % 4)};
      for (int v = 0; v < 8; v++) begin
        logic maj, ey, ideal;
        {a, b, c} = 3'(v);
        maj = (a & b) | (a & c) | (b & c);
        ey  = maj;
        ideal = maj;
        if (f >= 0) ey = ey ^ FAULTY[v][f];
        #1;
        checks++;
        if (y !== ey || floating !== 1'b0) begin
          failures++;
          $display("FAIL fault=%0d in=%b y=%b exp=%b", f, 3'(v), y, ey);
        end
        if (f < 0 && degraded !== 1'b0) begin
          failures++;
          $display("FAIL fault-free output degraded, in=%b", 3'(v));
        end
        if (f >= 0 && OFFRAIL[v][f] && !degraded) begin
          failures++;
          $display("FAIL fault=%0d in=%b not flagged degraded", f, 3'(v));
        end
        if (f >= 0 && y != ideal) hit = 1'b1;
        if (f >= 0 && (v == 0 || v == 7)) begin
          checks++;
          if (y !== maj) failures++;
        end
      end
      if (hit) n_det++;
    end
    checks++;
    if (n_det != 4) begin
      failures++;
      $display("FAIL detectable faults=%0d", n_det);
    end
    $display("detectable faults=%0d of 16", n_det);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
