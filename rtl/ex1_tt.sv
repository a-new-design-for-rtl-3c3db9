// ex1_tt -- the ex1 circuit made thru-testable.
//
// A thru function is logic that carries data from one register (or input)
// to another under some activating condition. A circuit is thru-testable
// when every register on its feedback loops lies on a chain of such
// functions (a thru path) from an input to an output, no thru path needs
// itself or a path that needs it to be activated, and conflicting demands
// on one signal in the same clock cycle can be broken up by hold functions.
// Test generation for such a circuit is as easy as for an acyclic one.
//
// ex1 already has thru functions that put most of its registers on paths:
//   A..E -> rega..rege   (active in s0)
//   rega, regb -> regf   (active in s1, as add or subtract)
//   regg -> rego         (active in s3, rego = regg - 3)
//   rego -> O            (a wire)
// What is missing, and what this module adds:
//   TP1, activator k1 -- the state register, which activates the other
//       thru functions, gets its own path: A[0] -> ps[1] -> ps[0] -> p,
//       with p a new output wired to ps[0].
//   TP2, activator k2 -- a new thru function regf -> regg, which closes
//       the path A -> rega -> regf -> regg -> rego -> O.
//   Hold functions on ps (h1), regf (h2) and regg (h3).
// The shape of these paths follows the method (paths start from existing
// inputs, use existing thru functions wherever they exist, TP1 and TP2
// have different activators, and a new output is added for the state
// path). The choice of A[0] as the TP1 source, and of ps, regf and regg as
// the three held registers, is this design's own: it gives two new
// activators and one new output for the partial version and five new
// inputs, three of them hold activators, plus one output for the full
// version, which is the pin overhead published for ex1.
//
// With k1 = k2 = h1 = h2 = h3 = 0 the module behaves exactly like ex1.
// Interface: clk, asynchronous active-high rst, data inputs A..D (W bits),
// E (1 bit), output O (W bits); test activators k1, k2, h1, h2, h3; test
// output p. Every register is one flip-flop stage; p and O are read
// straight from registers. Assertions at the end state the controller's
// normal-mode transitions and that a held register keeps its value.
module ex1_tt
  import ex1_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  word_t A,
  input  word_t B,
  input  word_t C,
  input  word_t D,
  input  logic  E,
  output word_t O,
  // test access
  input  logic  k1,   // TP1 activator: A[0] -> ps[1] -> ps[0]
  input  logic  k2,   // TP2 activator: regf -> regg
  input  logic  h1,   // hold ps
  input  logic  h2,   // hold regf
  input  logic  h3,   // hold regg
  output logic  p     // TP1 sink: ps[0]
);

  ex1_regs_t cur, nxt;

  ex1_core u_core (
    .cur (cur),
    .A   (A),
    .B   (B),
    .C   (C),
    .D   (D),
    .E   (E),
    .nxt (nxt),
    .O   (O)
  );

  // ---- state register: TP1 thru path and hold h1 ----
  logic [1:0] ps_q;

  tt_reg #(.W(2), .RESET_VAL(S0)) u_ps (
    .clk     (clk),
    .rst     (rst),
    .func_d  (nxt.ps),
    .thru_d  ({A[0], ps_q[1]}),
    .thru_en (k1),
    .hold_en (h1),
    .q       (ps_q)
  );

  assign cur.ps = state_t'(ps_q);
  assign p      = ps_q[0];

  // ---- regf: hold h2 (no new thru function; rega/regb -> regf exists) ----
  tt_reg #(.W(W)) u_regf (
    .clk     (clk),
    .rst     (rst),
    .func_d  (nxt.regf),
    .thru_d  ('0),
    .thru_en (1'b0),
    .hold_en (h2),
    .q       (cur.regf)
  );

  // ---- regg: TP2 thru function regf -> regg and hold h3 ----
  tt_reg #(.W(W)) u_regg (
    .clk     (clk),
    .rst     (rst),
    .func_d  (nxt.regg),
    .thru_d  (cur.regf),
    .thru_en (k2),
    .hold_en (h3),
    .q       (cur.regg)
  );

  // ---- registers left as in ex1 ----
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cur.rega <= '0;
      cur.regb <= '0;
      cur.regc <= '0;
      cur.regd <= '0;
      cur.rege <= 1'b0;
      cur.rego <= '0;
    end else begin
      cur.rega <= nxt.rega;
      cur.regb <= nxt.regb;
      cur.regc <= nxt.regc;
      cur.regd <= nxt.regd;
      cur.rege <= nxt.rege;
      cur.rego <= nxt.rego;
    end
  end

  // ---- rules of the controller in normal operation ----
  // Without k1/h1 the controller leaves s0 for s1 and s3 for s0 on every
  // clock; s1 and s2 never stay where they are.
  a_s0_to_s1: assert property (@(posedge clk) disable iff (rst)
      (cur.ps == S0 && !k1 && !h1) |=> cur.ps == S1);
  a_s3_to_s0: assert property (@(posedge clk) disable iff (rst)
      (cur.ps == S3 && !k1 && !h1) |=> cur.ps == S0);
  a_s1_moves: assert property (@(posedge clk) disable iff (rst)
      (cur.ps == S1 && !k1 && !h1) |=> cur.ps inside {S2, S3});
  // A held register does not change.
  a_hold_regf: assert property (@(posedge clk) disable iff (rst)
      h2 |=> $stable(cur.regf));

endmodule
