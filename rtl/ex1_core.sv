// ex1_core -- next-state logic of the ex1 example circuit.
//
// Purely combinational: given the present register values `cur` and the
// primary inputs, it returns the values every register takes at the next
// clock edge. This is the assignment decision diagram of ex1 written out:
// each register's next value is selected by the present state, and a
// register that is not assigned in a state keeps its value.
//
//   s0: rega<=A, regb<=B, regc<=C, regd<=D, rege<=E, regg<=0;      -> s1
//   s1: if regc < regd  regf<=rega+regb, -> s2
//       else            regf<=rega-regb, -> s3
//   s2: regg <= regf + regg + regf;  rege = 0 -> s1, else -> s3
//   s3: rego <= regg - 3;                                           -> s0
//
// Arithmetic is unsigned and wraps modulo 2**W; the comparison is unsigned.
// The output O is the register rego, wired straight out (a direct thru
// function). The state sequence and all operations follow the circuit
// description; the 1-bit register rege (loaded from E, tested in s2) is
// how the description's register list and flip-flop count are read.
//
// Interface: cur / nxt are the 59-bit register struct of ex1_pkg; A..D are
// W-bit data inputs, E a 1-bit input. No clock: the caller owns the
// flip-flops, so one ex1 operation takes 3 + 2*(number of s2 -> s1 loops)
// clock cycles from s0 back to s0, or 3 cycles on the s1 -> s3 branch.
module ex1_core
  import ex1_pkg::*;
(
  input  ex1_regs_t cur,
  input  word_t     A,
  input  word_t     B,
  input  word_t     C,
  input  word_t     D,
  input  logic      E,
  output ex1_regs_t nxt,
  output word_t     O
);

  always_comb begin
    nxt = cur;                       // unassigned registers hold
    unique case (cur.ps)
      S0: begin
        nxt.rega = A;
        nxt.regb = B;
        nxt.regc = C;
        nxt.regd = D;
        nxt.rege = E;
        nxt.regg = '0;
        nxt.ps   = S1;
      end
      S1: begin
        if (cur.regc < cur.regd) begin
          nxt.regf = cur.rega + cur.regb;
          nxt.ps   = S2;
        end else begin
          nxt.regf = cur.rega - cur.regb;
          nxt.ps   = S3;
        end
      end
      S2: begin
        nxt.regg = cur.regf + cur.regg + cur.regf;
        nxt.ps   = cur.rege ? S3 : S1;
      end
      S3: begin
        nxt.rego = cur.regg - word_t'(3);
        nxt.ps   = S0;
      end
    endcase
  end

  assign O = cur.rego;

endmodule
