// tb_ft_adder_stage -- fault campaigns on the triplicated one-bit adder.
//
// 1. Fault-free: s, co, co_n against the arithmetic result, all 8 vectors.
// 2. Every single fault of the stage (3 replicas x 64 + 3 voters x 16 = 240),
//    all 8 vectors: the voted outputs must stay correct.
// 3. Every pair of faults in two different replicas (3 x 64 x 64 = 12288):
//    fewer than 1% of the pairs may cause a wrong output.
// 4. Every pair of one replica fault and one voter fault (192 x 48 = 9216):
//    at most 192 pairs may cause a wrong output.
//    Of these, the 192 pairs with the same fault in two replicas must almost
//    all be masked (fewer than 5% failing), the purpose of the permutation.
// Both fault slots of the stage are used for the double faults. The test also
// counts how often a masked fault left a degraded node behind, and how many
// same-kind faults placed in two replicas break the stage.
module tb_ft_adder_stage;
  import cp_fault_pkg::*;

  localparam int NF = 2;

  logic a, b, c, s, co, co_n, degraded, floating;
  stage_fault_t flt [NF];
  int checks = 0, failures = 0;
  int n_degraded = 0;

  ft_adder_stage dut (
    .a(a), .a_n(~a), .b(b), .b_n(~b), .c(c), .c_n(~c), .flt(flt),
    .s(s), .co(co), .co_n(co_n), .degraded(degraded), .floating(floating));

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Fault number 0..239 -> slot descriptor. 0..191 replicas, 192..239 voters.
  function automatic stage_fault_t fault_of(int n);
    stage_fault_t d;
    d.en   = 1'b1;
    d.unit = 2'(n / 64);
    d.gate = 2'((n % 64) / 16);
    d.fet  = 2'((n % 16) / 4);
    d.kind = cp_fault_kind_e'(n % 4);
    return d;
  endfunction

  // Applies all 8 vectors; returns the number of vectors with a wrong output.
  task automatic sweep(output int wrong);
    wrong = 0;
    for (int v = 0; v < 8; v++) begin
      logic [1:0] total;
      {a, b, c} = 3'(v);
      total = 2'(a) + 2'(b) + 2'(c);
      #1;
      if (s != total[0] || co != total[1] || co_n != ~total[1]) wrong++;
      if (degraded) n_degraded++;
    end
  endtask

  initial begin
    int wrong, bad_pairs, pairs, same_bad;
    flt[0] = NO_STAGE_FAULT;
    flt[1] = NO_STAGE_FAULT;

    sweep(wrong);
    checks++;
    if (wrong != 0) begin
      failures++;
      $display("FAIL fault-free stage wrong on %0d vectors", wrong);
    end

    for (int n = 0; n < 240; n++) begin
      flt[0] = fault_of(n);
      sweep(wrong);
      checks++;
      if (wrong != 0) begin
        failures++;
        $display("FAIL single fault %0d not masked (%0d vectors)", n, wrong);
      end
    end
    $display("single faults: 240 injected, degraded-node observations %0d", n_degraded);
    checks++;
    if (n_degraded == 0) failures++;

    bad_pairs = 0; pairs = 0; same_bad = 0;
    for (int n0 = 0; n0 < 192; n0++) begin
      for (int n1 = 0; n1 < 192; n1++) begin
        if (n1 / 64 <= n0 / 64) continue;
        flt[0] = fault_of(n0);
        flt[1] = fault_of(n1);
        sweep(wrong);
        pairs++;
        if (wrong != 0) begin
          bad_pairs++;
          if (n0 % 64 == n1 % 64) same_bad++;
        end
      end
    end
    $display("replica+replica double faults: %0d of %0d fail (same fault in two replicas: %0d)",
             bad_pairs, pairs, same_bad);
    checks++;
    if (pairs != 12288 || bad_pairs * 100 >= pairs) failures++;
    // The input permutation keeps one fault type present in two replicas
    // from acting as a common-mode fault: of the 192 such pairs, fewer than
    // 5% may fail (without the permutation 72 of them would).
    checks++;
    if (same_bad * 20 >= 192) failures++;

    bad_pairs = 0; pairs = 0;
    for (int n0 = 0; n0 < 192; n0++) begin
      for (int n1 = 192; n1 < 240; n1++) begin
        flt[0] = fault_of(n0);
        flt[1] = fault_of(n1);
        sweep(wrong);
        pairs++;
        if (wrong != 0) bad_pairs++;
      end
    end
    $display("replica+voter double faults: %0d of %0d fail", bad_pairs, pairs);
    checks++;
    if (pairs != 9216 || bad_pairs > 192) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
