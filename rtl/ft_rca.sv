// ft_rca -- N-bit fault-tolerant ripple-carry adder built from
// controllable-polarity XOR/MAJ gates.
//
// Computes {cout, sum} = a + b + cin with a chain of N ft_adder_stage
// instances. Each stage receives the carry and the inverted carry from the
// previous one, which its replicas need as true and complemented
// operands, so no inverter sits in the carry chain. Because each stage votes
// its own outputs, a single fault in a stage never leaves it, and a fault in
// every stage is tolerated as long as each stage holds at most one. The
// complements of a, b and cin are formed by inverters at the inputs; they are
// outside the fault-tolerant region (a fault on an operand cannot be masked
// unless the operand is itself triplicated). In silicon the transmission-gate
// chain needs a restoring buffer after every fourth stage; that is an
// electrical measure and has no logic counterpart here.
//
// The chain structure follows the published design; the width N (the design
// is for any width) and the fault-slot mechanism are this design's choices.
//
// Faults: NF slots; slot k is applied to stage flt_stage[k].
//
// Interface: a, b, cin        operands and carry in
//            flt, flt_stage   fault slots and their target stage
//            sum, cout, cout_n result, carry out and its complement
//            degraded, floating   per-stage node flags (masked-fault indicator,
//                             undriven node)
// Timing: purely combinational; the carry ripples through N voted stages.
module ft_rca
  import cp_fault_pkg::*;
#(
  parameter int unsigned N  = 8,
  parameter int unsigned NF = 2,
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  logic          cin,
  input  stage_fault_t  flt       [NF],
  input  logic [SW-1:0] flt_stage [NF],
  output logic [N-1:0]  sum,
  output logic          cout,
  output logic          cout_n,
  output logic [N-1:0]  degraded,
  output logic [N-1:0]  floating
);

  logic [N:0] c, c_n;

  assign c[0]   = cin;
  assign c_n[0] = ~cin;

  for (genvar i = 0; i < N; i++) begin : g_stage
    stage_fault_t sflt [NF];

    always_comb begin
      for (int k = 0; k < NF; k++) begin
        sflt[k]    = flt[k];
        sflt[k].en = flt[k].en && (flt_stage[k] == SW'(i));
      end
    end

    ft_adder_stage #(.NF(NF)) u_stage (
      .a       (a[i]),
      .a_n     (~a[i]),
      .b       (b[i]),
      .b_n     (~b[i]),
      .c       (c[i]),
      .c_n     (c_n[i]),
      .flt     (sflt),
      .s       (sum[i]),
      .co      (c[i+1]),
      .co_n    (c_n[i+1]),
      .degraded    (degraded[i]),
      .floating(floating[i])
    );
  end

  assign cout   = c[N];
  assign cout_n = c_n[N];

endmodule
