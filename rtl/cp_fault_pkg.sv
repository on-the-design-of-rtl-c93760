// cp_fault_pkg -- types shared by the controllable-polarity adder models.
//
// A controllable-polarity transistor has two independent gates: the control
// gate (CG) switches it on and off, the polarity gate (PG) makes it n-type
// (PG=1) or p-type (PG=0). The fault model places a stuck-at-0 or stuck-at-1
// on either gate of one transistor (CG/0, CG/1, PG/0, PG/1); that is the
// fault model of the design. How faults are addressed inside a fault-tolerant
// stage (unit, gate, transistor) is this design's own encoding.
package cp_fault_pkg;

  // The four gate-terminal stuck-at faults of one transistor.
  typedef enum logic [1:0] {
    CG_SA0 = 2'd0,
    CG_SA1 = 2'd1,
    PG_SA0 = 2'd2,
    PG_SA1 = 2'd3
  } cp_fault_kind_e;

  // Fault control of one transistor: en=0 means fault-free.
  typedef struct packed {
    logic           en;
    cp_fault_kind_e kind;
  } cp_fault_t;

  // Fault controls of the four transistors t1..t4 of one gate (index 0..3).
  typedef cp_fault_t [3:0] cp_gate_fault_t;

  // Gates of one Fig.-4 style adder cell.
  localparam int unsigned GATE_S     = 0;  // sum
  localparam int unsigned GATE_S_N   = 1;  // inverted sum
  localparam int unsigned GATE_CO    = 2;  // carry
  localparam int unsigned GATE_CO_N  = 3;  // inverted carry

  // Units of one fault-tolerant stage: replicas 0..2, then the voters.
  localparam int unsigned NUM_REPLICAS = 3;
  localparam int unsigned UNIT_VOTER   = 3;
  // Voter gates inside UNIT_VOTER.
  localparam int unsigned VOTE_S    = 0;
  localparam int unsigned VOTE_CO   = 1;
  localparam int unsigned VOTE_CO_N = 2;

  // One fault slot addressed to a stage: which unit, gate, transistor, kind.
  typedef struct packed {
    logic           en;
    logic [1:0]     unit;   // 0..2 replica, 3 voters
    logic [1:0]     gate;   // see GATE_* / VOTE_*
    logic [1:0]     fet;    // 0..3 = t1..t4
    cp_fault_kind_e kind;
  } stage_fault_t;

  localparam cp_fault_t    NO_FAULT       = '0;
  localparam stage_fault_t NO_STAGE_FAULT = '0;

endpackage
