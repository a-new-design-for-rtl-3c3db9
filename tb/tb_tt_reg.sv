// tb_tt_reg -- self-checking test of the register with thru and hold
// functions.
//
// Random func_d / thru_d / activator sequences are applied; a model kept
// here predicts q after each clock edge (hold beats thru beats functional
// load; asynchronous reset to RESET_VAL). Directed steps check that reset
// acts without a clock edge and that each of the three loads happens.
module tb_tt_reg;
  localparam int unsigned W = 8;
  localparam logic [W-1:0] RV = 8'hA5;

  logic clk = 0, rst = 0;
  logic [W-1:0] func_d, thru_d, q, model;
  logic thru_en, hold_en;
  int checks = 0, failures = 0;
  int n_hold = 0, n_thru = 0, n_func = 0;

  tt_reg #(.W(W), .RESET_VAL(RV)) dut (
    .clk(clk), .rst(rst), .func_d(func_d), .thru_d(thru_d),
    .thru_en(thru_en), .hold_en(hold_en), .q(q));

  always #5 clk = ~clk;

  task automatic cmp(string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s q=%h expected=%h", what, q, model);
    end
  endtask

  initial begin
    func_d = '0; thru_d = '0; thru_en = 0; hold_en = 0;
    #2 rst = 1; #1 model = RV; cmp("async reset");
    #4 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      func_d  = W'($urandom);
      thru_d  = W'($urandom);
      thru_en = ($urandom % 3) == 0;
      hold_en = ($urandom % 4) == 0;
      if (hold_en)      begin n_hold++; end
      else if (thru_en) begin model = thru_d; n_thru++; end
      else              begin model = func_d; n_func++; end
      @(posedge clk); #1 cmp("load");
    end
    // reset in the middle of a run, between edges
    @(negedge clk); rst = 1; #1 model = RV; cmp("async reset 2");
    @(negedge clk); rst = 0;
    checks++;
    if (n_hold == 0 || n_thru == 0 || n_func == 0) begin
      failures++; $display("FAIL a load kind never happened");
    end
    $display("hold=%0d thru=%0d func=%0d", n_hold, n_thru, n_func);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
