// tb_ora: checks that an ORA latches a mismatch only while comparing, keeps
// it until cleared, and that a chain of ORAs in shift mode delivers the
// latched results in chain order, one per clock.
module tb_ora;
  localparam int K = 6;
  logic clk = 0, rst_n = 0, clr = 0, cmp = 0, shift = 0;
  logic a [K], b [K];
  logic fail [K];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < K; i++) begin : g
    ora dut (.clk, .rst_n, .clr, .cmp, .a(a[i]), .b(b[i]), .shift,
             .shift_in((i == K - 1) ? 1'b0 : fail[(i + 1) % K]), .fail(fail[i]));
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [K-1:0] expect_fail;
    for (int i = 0; i < K; i++) begin a[i] = 0; b[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    clr = 1; @(negedge clk); clr = 0;
    // A mismatch without cmp must not latch.
    a[0] = 1; @(negedge clk);
    checks++; if (fail[0]) failures++;
    a[0] = 0;
    // Random compare phase.
    expect_fail = '0;
    cmp = 1;
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < K; i++) begin
        a[i] = 1'($urandom);
        b[i] = ($urandom % 8 == 0) ? !a[i] : a[i];
        if (a[i] != b[i]) expect_fail[i] = 1'b1;
      end
      @(negedge clk);
      for (int i = 0; i < K; i++) begin
        checks++; if (fail[i] != expect_fail[i]) failures++;
      end
    end
    cmp = 0;
    for (int i = 0; i < K; i++) begin a[i] = 0; b[i] = 1; end
    // Shift out: bit i of the chain appears on fail[0] after i clocks.
    shift = 1;
    for (int i = 0; i < K; i++) begin
      checks++; if (fail[0] != expect_fail[i]) failures++;
      @(negedge clk);
    end
    checks++; if (fail[0] != 0) failures++;
    shift = 0;
    // Clear.
    cmp = 1; @(negedge clk); cmp = 0;
    clr = 1; @(negedge clk); clr = 0;
    for (int i = 0; i < K; i++) begin checks++; if (fail[i]) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
