// tb_ex1_core -- self-checking test of the ex1 next-state logic.
//
// Drives random register values and inputs into ex1_core in each of the
// four states and compares every field of the next-state struct with a
// reference computed here from the state table of ex1 (loads in s0,
// add/subtract chosen by an unsigned compare in s1, regg + 2*regf with a
// rege-controlled branch in s2, regg - 3 in s3). Directed cases cover the
// compare boundary (regc = regd) and wrap-around of every operation.
module tb_ex1_core;
  import ex1_pkg::*;

  ex1_regs_t cur, nxt;
  word_t A, B, C, D, O;
  logic  E;
  int checks = 0, failures = 0;

  ex1_core dut (.cur(cur), .A(A), .B(B), .C(C), .D(D), .E(E), .nxt(nxt), .O(O));

  // Reference, in plain integers.
  task automatic check_one();
    int unsigned m = 1 << W;
    logic [1:0] ps_e;
    int unsigned ra, rb, rc, rd, rf, rg, ro;
    logic re;
    ra = cur.rega; rb = cur.regb; rc = cur.regc; rd = cur.regd;
    re = cur.rege; rf = cur.regf; rg = cur.regg; ro = cur.rego;
    ps_e = cur.ps;
    case (cur.ps)
      2'd0: begin ra = A; rb = B; rc = C; rd = D; re = E; rg = 0; ps_e = 2'd1; end
      2'd1: if (cur.regc < cur.regd) begin rf = (ra + rb) % m; ps_e = 2'd2; end
            else begin rf = (ra + m - rb) % m; ps_e = 2'd3; end
      2'd2: begin rg = (2 * rf + rg) % m; ps_e = cur.rege ? 2'd3 : 2'd1; end
      default: begin ro = (rg + m - 3) % m; ps_e = 2'd0; end
    endcase
    checks++;
    if (nxt.ps != ps_e || nxt.rega != word_t'(ra) || nxt.regb != word_t'(rb) ||
        nxt.regc != word_t'(rc) || nxt.regd != word_t'(rd) || nxt.rege != re ||
        nxt.regf != word_t'(rf) || nxt.regg != word_t'(rg) || nxt.rego != word_t'(ro)) begin
      failures++;
      $display("FAIL ps=%0d cur=%h nxt=%h", cur.ps, cur, nxt);
    end
    checks++;
    if (O != cur.rego) begin
      failures++;
      $display("FAIL O=%h rego=%h", O, cur.rego);
    end
  endtask

  initial begin
    // directed: compare boundary and wrap-around
    cur = '0; A = 8'hFF; B = 8'h01; C = 8'h10; D = 8'h10; E = 1'b1;
    cur.ps = S1; cur.rega = 8'h05; cur.regb = 8'h07; cur.regc = 8'h10; cur.regd = 8'h10;
    #1 check_one();                               // equal -> subtract, wraps
    if (nxt.regf != 8'hFE || nxt.ps != S3) begin failures++; $display("FAIL equal compare"); end
    checks++;
    cur.regc = 8'h0F; #1 check_one();             // less -> add
    if (nxt.regf != 8'h0C || nxt.ps != S2) begin failures++; $display("FAIL less compare"); end
    checks++;
    cur.ps = S3; cur.regg = 8'h01; #1 check_one(); // 1 - 3 wraps to FE
    if (nxt.rego != 8'hFE) begin failures++; $display("FAIL s3 wrap"); end
    checks++;
    cur.ps = S2; cur.regf = 8'h90; cur.regg = 8'h05; cur.rege = 1'b0; #1 check_one();
    if (nxt.regg != 8'h25 || nxt.ps != S1) begin failures++; $display("FAIL s2 accumulate"); end
    checks++;
    // random
    for (int i = 0; i < 4000; i++) begin
      cur = ex1_regs_t'({$urandom, $urandom});
      A = word_t'($urandom); B = word_t'($urandom); C = word_t'($urandom);
      D = word_t'($urandom); E = 1'($urandom);
      #1 check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
