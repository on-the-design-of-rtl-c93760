// tb_cp_tg_cell -- checks the node resolution of the four-transistor cell.
//
// Drives all 64 combinations of the six cell inputs, including
// non-complementary control pairs that turn on both transmission gates or
// none, with no fault and with every single and double CG/PG fault on
// distinct transistors. The expected node is derived here from the
// list of conducting devices: which devices conduct is worked out per
// transistor from its (CG, PG) wiring, and then the pass-strength rule
// (n passes 0 strongly, p passes 1 strongly; strong 0 beats strong 1 beats
// weak) gives value, degraded and undriven flags.
module tb_cp_tg_cell;
  import cp_fault_pkg::*;

  logic a, a_n, b, b_n, d_top, d_bot, y, degraded, floating;
  cp_gate_fault_t flt;
  int checks = 0, failures = 0;
  int n_contend = 0, n_float = 0, n_strong_fight = 0;

  cp_tg_cell dut (.a(a), .a_n(a_n), .b(b), .b_n(b_n), .d_top(d_top), .d_bot(d_bot),
                  .flt(flt), .y(y), .degraded(degraded), .floating(floating));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f0 = -1; f0 < 16; f0++)
    for (int f1 = -1; f1 < 16; f1++) begin
      if (f1 >= 0 && (f0 < 0 || f1 / 4 <= f0 / 4)) continue;
      flt = '0;
      if (f0 >= 0) flt[f0 / 4] = '{en: 1'b1, kind: cp_fault_kind_e'(f0 % 4)};
      if (f1 >= 0) flt[f1 / 4] = '{en: 1'b1, kind: cp_fault_kind_e'(f1 % 4)};
    for (int v = 0; v < 64; v++) begin
      // (CG, PG) of t1..t4
      logic [1:0] gates [4];
      int s0, s1, w0, w1, n_on;
      logic ey, ed, ef;
      {a, a_n, b, b_n, d_top, d_bot} = 6'(v);
      gates[0] = {b_n, a};
      gates[1] = {b,   a_n};
      gates[2] = {b,   a};
      gates[3] = {b_n, a_n};
      // Apply the injected faults: CG is bit 1, PG bit 0 of gates[t].
      for (int t = 0; t < 4; t++) begin
        if (flt[t].en) begin
          case (flt[t].kind)
            CG_SA0: gates[t][1] = 1'b0;
            CG_SA1: gates[t][1] = 1'b1;
            PG_SA0: gates[t][0] = 1'b0;
            PG_SA1: gates[t][0] = 1'b1;
          endcase
        end
      end
      s0 = 0; s1 = 0; w0 = 0; w1 = 0; n_on = 0;
      for (int t = 0; t < 4; t++) begin
        logic d;
        d = (t < 2) ? d_top : d_bot;
        if (gates[t] == 2'b11) begin          // n-type, on
          n_on++;
          if (d) w1++; else s0++;
        end else if (gates[t] == 2'b00) begin // p-type, on
          n_on++;
          if (d) s1++; else w0++;
        end
      end
      ef = (n_on == 0);
      if ((s0 + w0) > 0 && (s1 + w1) > 0) begin
        ey = (s0 > 0) ? 1'b0 : (s1 > 0);
        ed = 1'b1;
        n_contend++;
      end else if ((s1 + w1) > 0) begin
        ey = 1'b1; ed = (s1 == 0);
      end else begin
        ey = 1'b0; ed = (w0 > 0 && s0 == 0);
      end
      if (ef) n_float++;
      #1;
      checks++;
      if (y !== ey || degraded !== ed || floating !== ef) begin
        failures++;
        $display("FAIL faults=%0d,%0d in=%b y=%b/%b deg=%b/%b flt=%b/%b", f0, f1, 6'(v), y, ey,
                 degraded, ed, floating, ef);
      end
        if (s0 > 0 && s1 > 0) n_strong_fight++;
    end
    end
    checks++;
    if (n_contend == 0 || n_float == 0 || n_strong_fight == 0) failures++;
    $display("contention cases=%0d (strong against strong %0d) undriven cases=%0d", n_contend,
             n_strong_fight, n_float);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
