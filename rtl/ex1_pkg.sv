// ex1_pkg -- types shared by the ex1 example circuit and its thru-testable
// version.
//
// ex1 is a small circuit that mixes controller and datapath in one process:
// a four-state controller (ps) steers seven 8-bit data registers and one
// 1-bit register. The register set is gathered into one packed struct so
// that the next-state logic (ex1_core) can be written once and wrapped by
// either plain flip-flops or by flip-flops that carry test (thru and hold)
// functions (ex1_tt).
//
// Register count: 7 x 8-bit words + 1-bit rege + 2-bit ps = 59 flip-flops,
// the size the published characteristics give for ex1. The word width and
// the state names s0..s3 follow the circuit description; the binary state
// encoding s0=00, s1=01, s2=10, s3=11 is this design's choice.
package ex1_pkg;

  // Data word width of ex1 (A, B, C, D, O and the word registers).
  parameter int unsigned W = 8;

  typedef enum logic [1:0] {
    S0 = 2'b00,   // load the operands from A..E, clear regg
    S1 = 2'b01,   // regf <= rega +/- regb depending on regc < regd
    S2 = 2'b10,   // regg <= regg + 2*regf, loop to S1 while rege = 0
    S3 = 2'b11    // rego <= regg - 3, back to S0
  } state_t;

  typedef logic [W-1:0] word_t;

  // The 59 state bits of ex1.
  typedef struct packed {
    state_t ps;
    word_t  rega;
    word_t  regb;
    word_t  regc;
    word_t  regd;
    logic   rege;
    word_t  regf;
    word_t  regg;
    word_t  rego;
  } ex1_regs_t;

endpackage
