// tb_cp_full_adder -- exhaustive single-fault campaign on the one-bit adder
// cell.
//
// Fault-free, all four outputs must equal the arithmetic sum and carry and
// their complements for all 8 input vectors. Then each of the 64 single
// CG/PG faults (4 gates x 4 transistors x 4 kinds) is injected and all 8
// vectors are applied: only the output of the faulted gate may be wrong,
// and a fault counts as masked when no vector shows it. The expected masked
// counts are 8 of 16 per XOR gate and 12 of 16 per MAJ gate, 40 of 64 in
// all, as characterised for the cell.
module tb_cp_full_adder;
  import cp_fault_pkg::*;

  logic a, b, c, s, s_n, co, co_n, degraded, floating;
  cp_gate_fault_t [3:0] flt;
  int checks = 0, failures = 0;
  int masked [4];
  int masked_total;
  logic hit;

  cp_full_adder dut (.a(a), .a_n(~a), .b(b), .b_n(~b), .c(c), .c_n(~c), .flt(flt),
                     .s(s), .s_n(s_n), .co(co), .co_n(co_n),
                     .degraded(degraded), .floating(floating));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    masked = '{default: 0};
    for (int f = -1; f < 64; f++) begin
      int g;
      g   = (f < 0) ? 0 : f / 16;
      hit = 1'b0;
      flt = '0;
      if (f >= 0) flt[g][(f / 4) % 4] = '{en: 1'b1, kind: cp_fault_kind_e'(f % 4)};
      for (int v = 0; v < 8; v++) begin
        logic [1:0] total;
        logic [3:0] got, exp, diff;
        {a, b, c} = 3'(v);
        total = 2'(a) + 2'(b) + 2'(c);
        exp   = {~total[1], total[1], ~total[0], total[0]};  // co_n co s_n s
        #1;
        got  = {co_n, co, s_n, s};
        diff = got ^ exp;
        checks++;
        if (f < 0) begin
          if (diff != 0 || degraded || floating) begin
            failures++;
            $display("FAIL fault-free in=%b got=%b exp=%b", 3'(v), got, exp);
          end
        end else begin
          if ((diff & ~(4'b0001 << g)) != 0) begin
            failures++;
            $display("FAIL fault %0d in gate %0d disturbs another output, in=%b", f, g, 3'(v));
          end
          if (diff != 0) hit = 1'b1;
        end
      end
      if (f >= 0 && !hit) masked[g]++;
    end
    masked_total = masked[0] + masked[1] + masked[2] + masked[3];
    $display("masked single faults: S %0d, S_n %0d, Co %0d, Co_n %0d, total %0d of 64",
             masked[0], masked[1], masked[2], masked[3], masked_total);
    checks++;
    if (masked[0] != 8 || masked[1] != 8 || masked[2] != 12 || masked[3] != 12) failures++;
    checks++;
    if (masked_total != 40) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
