// tb_cp_xor3 -- checks the three-input XOR gate against its published
// fault characterisation.
//
// Applies the 8 input vectors with the gate fault-free and with each of the
// 16 single CG/PG faults (t1..t4 x CG/0, CG/1, PG/0, PG/1). The expected
// logic value is a ^ b ^ c, inverted where the characterisation shows a
// wrong output level (V_OH above 0.600 V, V_OL below 0.540 V). The degraded
// flag must be set exactly where the characterised output is off the rail
// (masked fault). Table rows are indexed {a, b, c}; a bit of a row mask is
// fault t*4 + kind. For input 100 the t3 CG/0 and CG/1 entries are taken in
// the order that matches the gate's switch behaviour, and the degraded flag
// is not checked on that row.
module tb_cp_xor3;
  import cp_fault_pkg::*;

  logic a, b, c, y, degraded, floating;
  cp_gate_fault_t flt;
  int checks = 0, failures = 0;
  logic hit;
  int n_det;

  cp_xor3 dut (.a(a), .a_n(~a), .b(b), .b_n(~b), .c(c), .c_n(~c), .flt(flt),
               .y(y), .degraded(degraded), .floating(floating));

  // Faults that flip the output, per input vector.
  localparam logic [15:0] FAULTY [8] = '{
    16'h0000, 16'h0028, 16'h2800, 16'h0000, 16'h8200, 16'h0000, 16'h0000, 16'h0082};
  // Faults that leave the output off the rail, per input vector.
  localparam logic [15:0] OFFRAIL [8] = '{
    16'h5069, 16'h0a69, 16'h690a, 16'h6950, 16'h8b50, 16'h9605, 16'h0596, 16'ha096};

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
        logic ey, ed, ideal;
        {a, b, c} = 3'(v);
        ey = a ^ b ^ c;
        ideal = ey;
        ed = 1'b0;
        if (f >= 0) begin
          ey = ey ^ FAULTY[v][f];
          ed = OFFRAIL[v][f] | FAULTY[v][f];
        end
        #1;
        checks++;
        if (y !== ey || floating !== 1'b0 || (v != 4 && degraded !== ed)) begin
          failures++;
          $display("FAIL fault=%0d in=%b y=%b exp=%b degraded=%b exp=%b", f, 3'(v), y, ey,
                   degraded, ed);
        end
        if (f >= 0 && y != ideal) hit = 1'b1;
      end
      if (hit) n_det++;
    end
    // 8 of the 16 faults are observable, the other 8 always masked.
    checks++;
    if (n_det != 8) begin
      failures++;
      $display("FAIL detectable faults=%0d", n_det);
    end
    $display("detectable faults=%0d of 16", n_det);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
