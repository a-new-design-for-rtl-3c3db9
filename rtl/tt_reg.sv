// tt_reg -- a register with a thru function and a hold function added for
// test.
//
// The thru-testable test method makes a circuit easy to test by giving
// chosen registers two extra ways of being loaded, each enabled by its own
// activating input:
//   * a new thru function: when `thru_en` (the activator) is 1 the register
//     loads `thru_d`, a value taken from a primary input or from the
//     preceding register of a thru path, instead of its functional value;
//   * a hold function (a "self thru function"): when `hold_en` is 1 the
//     register keeps its value, which delays one of two events that would
//     otherwise need the same signal at the same time.
// With both activators at 0 the register behaves exactly as before
// (it loads `func_d`).
//
// Priority hold > thru > functional, and an asynchronous active-high reset
// to RESET_VAL, are this design's choices; the method itself only asks that
// each function be enabled by its activator.
//
// Timing: one flip-flop stage; q takes the selected value at the rising
// edge of clk.
module tt_reg #(
  parameter int unsigned     W         = 1,
  parameter logic [W-1:0]    RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] func_d,    // value of the original circuit
  input  logic [W-1:0] thru_d,    // source of the new thru function
  input  logic         thru_en,   // activator of the new thru function
  input  logic         hold_en,   // activator of the hold function
  output logic [W-1:0] q
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)          q <= RESET_VAL;
    else if (hold_en) q <= q;
    else if (thru_en) q <= thru_d;
    else              q <= func_d;
  end

endmodule
