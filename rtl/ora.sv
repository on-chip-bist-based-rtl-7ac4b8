// ora: comparison-based output response analyzer with retrieval shift mode.
//
// In compare mode (shift = 0) the ORA compares two responses `a` and `b`
// whenever `cmp` is high and sets its fail latch on any mismatch; the latch
// holds until `clr`. A latched 1 is a failure indication. In shift mode
// (shift = 1) the fail latches of a string of ORAs form a shift register:
// each ORA loads `shift_in` and presents its own latch on `fail`, so results
// move one ORA per clock towards the reader. The document describes the
// shift mode as a partial reconfiguration of the ORA PLBs; here it is a
// mode input. Timing: one clock for compare or shift.
module ora (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic cmp,
  input  logic a,
  input  logic b,
  input  logic shift,
  input  logic shift_in,
  output logic fail
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        fail <= 1'b0;
    else if (clr)      fail <= 1'b0;
    else if (shift)    fail <= shift_in;
    else if (cmp && (a != b)) fail <= 1'b1;
  end
endmodule
