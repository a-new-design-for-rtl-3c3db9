// tb_ex1_tt -- end-to-end test of the thru-testable ex1 at its default size.
//
// A cycle-accurate model of the circuit, written here from the state table
// of ex1 plus the added test functions, runs in lock step with the design;
// after every clock edge O, p and all 59 register bits are compared.
// The test runs in four phases:
//   1. normal operation (all activators 0): complete ex1 operations with
//      known results -- O = 2*(A+B) - 3 when C < D and E = 1, O = 0 - 3
//      when C >= D -- checking the value and the cycle count (4 clocks on
//      the s2 branch, 3 on the direct s1 -> s3 branch), plus the s2 -> s1
//      loop taken when E = 0;
//   2. thru path TP1 (k1): a bit pattern on A[0] must come out of p after
//      two clock edges, and the state can be set to any value through it;
//   3. thru path TP2 (k2): a value is carried A -> rega -> regf -> regg ->
//      rego -> O with the state steered through TP1, and O checked;
//   4. random activators and inputs, checked against the model.
// Each mechanism (add, subtract, s2 loop, s2 exit, TP1 load, TP2 load,
// hold of ps, regf and regg) is counted; one that never happens is a
// failure.
module tb_ex1_tt;
  import ex1_pkg::*;

  logic  clk = 0, rst = 0;
  word_t A = '0, B = '0, C = '0, D = '0, O;
  logic  E = 0, k1 = 0, k2 = 0, h1 = 0, h2 = 0, h3 = 0, p;

  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_loop = 0, n_exit = 0;
  int n_tp1 = 0, n_tp2 = 0, n_h1 = 0, n_h2 = 0, n_h3 = 0, n_ops = 0;

  ex1_tt dut (.clk(clk), .rst(rst), .A(A), .B(B), .C(C), .D(D), .E(E), .O(O),
              .k1(k1), .k2(k2), .h1(h1), .h2(h2), .h3(h3), .p(p));

  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  logic [1:0] m_ps;
  logic [7:0] m_a, m_b, m_c, m_d, m_f, m_g, m_o;
  logic       m_e;

  task automatic model_reset();
    m_ps = 0; m_a = 0; m_b = 0; m_c = 0; m_d = 0; m_e = 0; m_f = 0; m_g = 0; m_o = 0;
  endtask

  // Next values of the model for the present inputs; called just before a
  // rising edge, applied after it.
  logic [1:0] n_ps;
  logic [7:0] n_a, n_b, n_c, n_d, n_f, n_g, n_o;
  logic       n_e;
  task automatic model_step();
    logic [1:0] f_ps;
    logic [7:0] f_f, f_g;
    n_a = m_a; n_b = m_b; n_c = m_c; n_d = m_d; n_e = m_e; n_o = m_o;
    f_ps = m_ps; f_f = m_f; f_g = m_g;
    case (m_ps)
      2'd0: begin n_a = A; n_b = B; n_c = C; n_d = D; n_e = E; f_g = 0; f_ps = 1; end
      2'd1: if (m_c < m_d) begin f_f = m_a + m_b; f_ps = 2; end
            else begin f_f = m_a - m_b; f_ps = 3; end
      2'd2: begin f_g = m_f + m_f + m_g; f_ps = m_e ? 2'd3 : 2'd1; end
      2'd3: begin n_o = m_g - 8'd3; f_ps = 0; end
    endcase
    // test functions: hold beats thru beats functional
    n_ps = h1 ? m_ps : k1 ? {A[0], m_ps[1]} : f_ps;
    n_f  = h2 ? m_f : f_f;
    n_g  = h3 ? m_g : k2 ? m_f : f_g;
    // mechanism counters (only where the mechanism changes what happens)
    if (!h1 && !k1 && m_ps == 2'd1 && !h2) begin if (m_c < m_d) n_add++; else n_sub++; end
    if (!h1 && !k1 && m_ps == 2'd2) begin if (m_e) n_exit++; else n_loop++; end
    if (!h1 && k1) n_tp1++;
    if (!h3 && k2) n_tp2++;
    if (h1 && (k1 || f_ps != m_ps)) n_h1++;
    if (h2 && f_f != m_f) n_h2++;
    if (h3 && ((k2 ? m_f : f_g) != m_g)) n_h3++;
  endtask

  task automatic compare(string where);
    checks++;
    if (O !== m_o || p !== m_ps[0] || dut.cur.ps !== state_t'(m_ps) ||
        dut.cur.rega !== m_a || dut.cur.regb !== m_b || dut.cur.regc !== m_c ||
        dut.cur.regd !== m_d || dut.cur.rege !== m_e || dut.cur.regf !== m_f ||
        dut.cur.regg !== m_g) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s t=%0t O=%h/%h p=%b ps=%0d/%0d f=%h/%h g=%h/%h", where, $time,
                 O, m_o, p, dut.cur.ps, m_ps, dut.cur.regf, m_f, dut.cur.regg, m_g);
    end
  endtask

  // One clock: inputs are already set (after a falling edge).
  task automatic tick(string where = "cycle");
    model_step();
    @(posedge clk);
    m_ps = n_ps; m_a = n_a; m_b = n_b; m_c = n_c; m_d = n_d; m_e = n_e;
    m_f = n_f; m_g = n_g; m_o = n_o;
    #1 compare(where);
    @(negedge clk);
  endtask

  task automatic expect_eq(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h expected=%h", what, got, exp);
    end
  endtask

  // One normal ex1 operation from s0: returns clocks until rego is written.
  task automatic run_op(input word_t a, b, c, d, input logic e, output int cycles);
    cycles = 0;
    A = a; B = b; C = c; D = d; E = e;
    do begin
      tick("normal");
      cycles++;
    end while (m_ps != 2'd0 && cycles < 50);
    n_ops++;
  endtask

  initial begin
    int cyc;
    word_t a, b, c, d, exp_o;
    @(negedge clk);
    rst = 1; #1 model_reset(); compare("reset");
    @(negedge clk); rst = 0;

    // ---- phase 1: normal operation ----
    // C < D, E = 1: s0 s1 s2 s3 -> O = 2*(A+B) - 3 after 4 clocks
    run_op(8'd20, 8'd7, 8'd1, 8'd2, 1'b1, cyc);
    expect_eq("op add result", O, 8'((20 + 7) * 2 - 3));
    expect_eq("op add cycles", 8'(cyc), 8'd4);
    // C >= D: s0 s1 s3 -> O = 0 - 3 after 3 clocks
    run_op(8'd9, 8'd200, 8'd5, 8'd5, 1'b0, cyc);
    expect_eq("op sub result", O, 8'hFD);
    expect_eq("op sub cycles", 8'(cyc), 8'd3);
    for (int i = 0; i < 200; i++) begin
      a = word_t'($urandom); b = word_t'($urandom);
      c = word_t'($urandom); d = word_t'($urandom);
      if (c < d) begin
        exp_o = 8'((a + b) * 2 - 3);
        run_op(a, b, c, d, 1'b1, cyc);
        expect_eq("rand op cycles", 8'(cyc), 8'd4);
      end else begin
        exp_o = 8'hFD;
        run_op(a, b, c, d, 1'($urandom), cyc);
        expect_eq("rand op cycles", 8'(cyc), 8'd3);
      end
      expect_eq("rand op result", O, exp_o);
    end
    // E = 0 with C < D: s1 <-> s2 loop, regg grows by 2*(A+B) per pass
    A = 8'd3; B = 8'd4; C = 8'd0; D = 8'd1; E = 1'b0;
    tick("loop");                               // s0
    for (int i = 1; i <= 5; i++) begin
      tick("loop"); tick("loop");               // s1, s2
      expect_eq("loop regg", dut.cur.regg, 8'(14 * i));
    end

    // ---- phase 2: TP1 thru path A[0] -> ps[1] -> ps[0] -> p ----
    k1 = 1;
    begin
      logic [15:0] pat = 16'b1011_0010_1110_0101;
      for (int i = 0; i < 16; i++) begin
        A[0] = pat[i];
        tick("tp1");
        // the bit driven before edge i-1 reaches p at edge i
        if (i >= 1) expect_eq("tp1 p", 8'(p), 8'(pat[i-1]));
      end
    end
    // set the state to s3 through TP1: ps[1]=1, ps[0]=1
    A[0] = 1; tick("tp1"); tick("tp1");
    k1 = 0;
    expect_eq("tp1 set state", 8'(dut.cur.ps), 8'd3);

    // ---- phase 3: TP2 A -> rega -> regf -> regg -> rego -> O ----
    // load in s0 (state set via TP1), compute regf in s1 (C >= D: A - B),
    // move regf to regg with k2, then s3 writes rego = regg - 3.
    A = 8'h00; k1 = 1; tick("tp2"); tick("tp2"); k1 = 0;   // ps = s0
    A = 8'h5A; B = 8'h00; C = 8'h01; D = 8'h00; E = 1'b1;
    tick("tp2");                                 // s0: rega = 5A
    h3 = 1; tick("tp2"); h3 = 0;                 // s1: regf = 5A - 0, hold regg
    // ps is now s3; steer the regg load there with k2 and hold ps (h1)
    k2 = 1; h1 = 1; tick("tp2"); k2 = 0; h1 = 0; // regg = regf = 5A
    tick("tp2");                                 // s3: rego = 5A - 3
    expect_eq("tp2 O", O, 8'h57);

    // hold of regf while the state machine passes s1
    A = 8'h11; B = 8'h22; C = 8'h00; D = 8'h01; E = 1'b1;
    while (m_ps != 2'd0) tick("h2");
    tick("h2");                                  // s0
    h2 = 1; tick("h2"); h2 = 0;                  // s1 with regf held
    expect_eq("h2 regf held", dut.cur.regf, 8'h5A);

    // ---- phase 4: random activators ----
    for (int i = 0; i < 5000; i++) begin
      A = word_t'($urandom); B = word_t'($urandom); C = word_t'($urandom);
      D = word_t'($urandom); E = 1'($urandom);
      k1 = ($urandom % 6) == 0; k2 = ($urandom % 6) == 0;
      h1 = ($urandom % 8) == 0; h2 = ($urandom % 8) == 0; h3 = ($urandom % 8) == 0;
      tick("random");
    end
    k1 = 0; k2 = 0; h1 = 0; h2 = 0; h3 = 0;

    // asynchronous reset in mid-operation
    #2 rst = 1; #1 model_reset(); compare("reset 2");
    @(negedge clk); rst = 0;

    $display("ops=%0d add=%0d sub=%0d loop=%0d exit=%0d tp1=%0d tp2=%0d h1=%0d h2=%0d h3=%0d",
             n_ops, n_add, n_sub, n_loop, n_exit, n_tp1, n_tp2, n_h1, n_h2, n_h3);
    checks++;
    if (n_ops == 0 || n_add == 0 || n_sub == 0 || n_loop == 0 || n_exit == 0 ||
        n_tp1 == 0 || n_tp2 == 0 || n_h1 == 0 || n_h2 == 0 || n_h3 == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
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
