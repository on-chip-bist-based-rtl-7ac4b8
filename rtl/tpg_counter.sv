// tpg_counter: logic BIST test pattern generator.
//
// A binary up-counter (5 bits, as the document specifies) whose count is
// broadcast to the PLBs under test. Counting is enabled by `run`; `clr`
// restarts it at zero. `wrap` pulses on the cycle the counter rolls over
// from all ones to zero, so one pass over every input pattern takes 2**WIDTH
// enabled cycles. Clear and wrap signalling are this design's own additions.
module tpg_counter #(
  parameter int unsigned WIDTH = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             run,
  output logic [WIDTH-1:0] pattern,
  output logic             wrap
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   pattern <= '0;
    else if (clr) pattern <= '0;
    else if (run) pattern <= pattern + 1'b1;
  end

  assign wrap = run && !clr && (&pattern);
endmodule
