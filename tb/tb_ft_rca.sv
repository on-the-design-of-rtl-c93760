// tb_ft_rca -- end-to-end test of the fault-tolerant ripple-carry adder at its
// default width.
//
// Every check compares {cout, sum} and cout_n with a + b + cin computed here.
//   1. Fault-free: random operands plus the full-length carry ripple
//      (all ones + 1).
//   2. Every single fault (240 per stage) in every stage, each driven with
//      all 8 local (a, b, carry-in) combinations of the faulty stage; the
//      carry into stage i is set through the lower operand bits.
//   3. Random pairs of faults in two different stages: each stage masks its
//      own fault, so the adder stays correct.
//   4. Random pairs of faults inside one stage: a few such pairs are known
//      to defeat the voting, and the test must see at least one.
// Each mechanism is counted (full ripple, replica and voter faults masked,
// degraded nodes, cross-stage doubles masked, same-stage doubles failing);
// one that never happens is a failure.
module tb_ft_rca;
  import cp_fault_pkg::*;

  localparam int N  = 8;
  localparam int NF = 2;
  localparam int SW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0]  a, b, sum, degraded, floating;
  logic          cin, cout, cout_n;
  stage_fault_t  flt       [NF];
  logic [SW-1:0] flt_stage [NF];
  int checks = 0, failures = 0;

  int n_ripple = 0, n_rep_masked = 0, n_vote_masked = 0, n_degraded = 0;
  int n_cross_ok = 0, n_same_fail = 0;

  ft_rca dut (.a(a), .b(b), .cin(cin), .flt(flt), .flt_stage(flt_stage),
              .sum(sum), .cout(cout), .cout_n(cout_n),
              .degraded(degraded), .floating(floating));

  initial begin : watchdog
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic stage_fault_t fault_of(int n);
    stage_fault_t d;
    d.en   = 1'b1;
    d.unit = 2'(n / 64);
    d.gate = 2'((n % 64) / 16);
    d.fet  = 2'((n % 16) / 4);
    d.kind = cp_fault_kind_e'(n % 4);
    return d;
  endfunction

  // Applies the current operands; returns 1 when the result is right.
  task automatic apply(output bit ok);
    logic [N:0] exp;
    #1;
    exp = {1'b0, a} + {1'b0, b} + (N + 1)'(cin);
    ok  = ({cout, sum} == exp) && (cout_n == ~exp[N]);
    if (|degraded) n_degraded++;
  endtask

  // Drives stage i with local inputs (ai, bi, ci), random upper bits.
  task automatic drive_local(int i, logic ai, logic bi, logic ci);
    a = N'($urandom);
    b = N'($urandom);
    a[i] = ai;
    b[i] = bi;
    for (int j = 0; j < i; j++) begin
      a[j] = ci;
      b[j] = ci;
    end
    cin = (i == 0) ? ci : 1'b0;
  endtask

  initial begin
    bit ok;
    flt[0] = NO_STAGE_FAULT;  flt_stage[0] = '0;
    flt[1] = NO_STAGE_FAULT;  flt_stage[1] = '0;

    // 1. fault-free
    for (int k = 0; k < 200; k++) begin
      a = N'($urandom); b = N'($urandom); cin = 1'($urandom);
      if (k == 0) begin a = '1; b = N'(1); cin = 1'b0; end
      if (k == 1) begin a = '1; b = '0;    cin = 1'b1; end
      apply(ok);
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL fault-free %h + %h + %b", a, b, cin);
      end else if ((a ^ b) == '1 && cin) n_ripple++;
      else if (a == '1 && b == N'(1)) n_ripple++;
    end

    // 2. every single fault in every stage
    for (int i = 0; i < N; i++) begin
      flt_stage[0] = SW'(i);
      for (int n = 0; n < 240; n++) begin
        bit all_ok;
        flt[0] = fault_of(n);
        all_ok = 1'b1;
        for (int v = 0; v < 8; v++) begin
          drive_local(i, v[2], v[1], v[0]);
          apply(ok);
          checks++;
          if (!ok) begin
            failures++;
            all_ok = 1'b0;
            $display("FAIL stage %0d fault %0d in=%b", i, n, 3'(v));
          end
        end
        if (all_ok && n < 192) n_rep_masked++;
        if (all_ok && n >= 192) n_vote_masked++;
      end
    end

    // 3. two faults in two different stages
    for (int k = 0; k < 3000; k++) begin
      int s0, s1;
      s0 = $urandom_range(N - 1);
      s1 = (s0 + 1 + $urandom_range(N - 2)) % N;
      flt[0] = fault_of($urandom_range(239)); flt_stage[0] = SW'(s0);
      flt[1] = fault_of($urandom_range(239)); flt_stage[1] = SW'(s1);
      for (int v = 0; v < 8; v++) begin
        drive_local(s0, v[2], v[1], v[0]);
        apply(ok);
        checks++;
        if (!ok) begin
          failures++;
          $display("FAIL stages %0d/%0d faults %p", s0, s1, flt);
        end
      end
      n_cross_ok++;
    end

    // 4. two faults inside one stage (expected to fail now and then)
    for (int k = 0; k < 4000; k++) begin
      int st;
      bit any_bad;
      st = $urandom_range(N - 1);
      flt[0] = fault_of($urandom_range(239)); flt_stage[0] = SW'(st);
      flt[1] = fault_of($urandom_range(239)); flt_stage[1] = SW'(st);
      any_bad = 1'b0;
      for (int v = 0; v < 8; v++) begin
        drive_local(st, v[2], v[1], v[0]);
        apply(ok);
        if (!ok) any_bad = 1'b1;
      end
      if (any_bad) n_same_fail++;
    end

    $display("mechanisms: full ripple %0d, replica faults masked %0d, voter faults masked %0d,",
             n_ripple, n_rep_masked, n_vote_masked);
    $display("            degraded nodes seen %0d, cross-stage doubles masked %0d,",
             n_degraded, n_cross_ok);
    $display("            same-stage doubles that failed %0d of 4000", n_same_fail);
    checks++; if (n_ripple == 0)        failures++;
    checks++; if (n_rep_masked != N * 192) failures++;
    checks++; if (n_vote_masked != N * 48) failures++;
    checks++; if (n_degraded == 0)      failures++;
    checks++; if (n_cross_ok == 0)      failures++;
    checks++; if (n_same_fail == 0)     failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
