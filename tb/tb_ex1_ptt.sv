// tb_ex1_ptt -- the partially thru-testable use of ex1_tt: hold inputs tied
// to 0, only the two thru-path activators k1 and k2 and the output p used.
//
// Repeats, for random data, a test-style transfer that needs no hold:
//   1. k1 = 1 for two clocks with A[0] = 0 sets the state to s0 through
//      TP1 (A[0] -> ps[1] -> ps[0]); p is checked after each clock;
//   2. s0 loads A, B = 0, C < D, E = 1; s1 computes regf = A;
//   3. in s2, k2 = 1 moves regf into regg through the new thru function
//      (the controller moves on to s3 at the same edge);
//   4. s3 writes rego = regg - 3, so O must equal A - 3.
// It also drives random 2-bit states through TP1 and reads them back on p.
module tb_ex1_ptt;
  import ex1_pkg::*;

  logic  clk = 0, rst = 0;
  word_t A = '0, B = '0, C = '0, D = '0, O;
  logic  E = 0, k1 = 0, k2 = 0, p;
  int checks = 0, failures = 0;

  ex1_tt dut (.clk(clk), .rst(rst), .A(A), .B(B), .C(C), .D(D), .E(E), .O(O),
              .k1(k1), .k2(k2), .h1(1'b0), .h2(1'b0), .h3(1'b0), .p(p));

  always #5 clk = ~clk;

  task automatic step();
    @(posedge clk); #1;
    @(negedge clk);
  endtask

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0h expected=%0h", what, got, exp);
    end
  endtask

  initial begin
    word_t a;
    logic [1:0] st;
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    for (int i = 0; i < 300; i++) begin
      // scramble the state first
      A = word_t'($urandom); B = word_t'($urandom); C = word_t'($urandom);
      D = word_t'($urandom); E = 1'($urandom);
      repeat ($urandom % 5) step();
      // 1. state := s0 through TP1
      k1 = 1; A[0] = 0; step(); step(); k1 = 0;
      expect_eq("p after TP1", int'(p), 0);
      // 2. load and compute regf = A + 0
      a = word_t'($urandom);
      A = a; B = 0; C = 8'd0; D = 8'd1; E = 1'b1;
      step();                                  // s0 -> s1
      step();                                  // s1 -> s2, regf = a
      // 3. regf -> regg in s2
      k2 = 1; step(); k2 = 0;                  // s2 -> s3, regg = a
      // 4. s3: rego = a - 3
      step();
      expect_eq("O through TP2", int'(O), int'(word_t'(a - 8'd3)));
      // TP1 read-back of a random state
      st = 2'($urandom);
      k1 = 1;
      A[0] = st[0]; step();
      A[0] = st[1]; step();
      expect_eq("TP1 ps", int'(dut.cur.ps), int'(st));
      expect_eq("TP1 p", int'(p), int'(st[0]));
      A[0] = 0; step();
      expect_eq("TP1 shift to p", int'(p), int'(st[1]));
      k1 = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
