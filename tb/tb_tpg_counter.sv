// tb_tpg_counter: checks that the TPG counts up by one per enabled clock,
// holds when not running, clears to zero and wraps after 2**5 = 32 patterns.
module tb_tpg_counter;
  logic clk = 0, rst_n = 0, clr = 0, run = 0;
  logic [4:0] pattern;
  logic wrap;
  int checks = 0, failures = 0;

  tpg_counter #(.WIDTH(5)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wraps, cyc;
    logic [4:0] model;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (pattern != 0) failures++;
    run = 1; model = 0; wraps = 0; cyc = 0;
    for (int i = 0; i < 70; i++) begin
      @(negedge clk);
      model = model + 1; cyc++;
      checks++; if (pattern != model) failures++;
      if (wrap) begin
        wraps++;
        checks++; if (pattern != 5'd31) failures++;
      end
    end
    // 70 steps from 0: wraps after the 32nd and 64th pattern.
    checks++; if (wraps != 2) begin failures++; $display("wraps %0d", wraps); end
    run = 0;
    repeat (3) @(negedge clk);
    checks++; if (pattern != model) failures++;
    clr = 1; @(negedge clk); clr = 0;
    checks++; if (pattern != 0) failures++;
    // Exactly 32 enabled clocks walk through all patterns back to zero.
    run = 1; repeat (32) @(negedge clk); run = 0;
    checks++; if (pattern != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
