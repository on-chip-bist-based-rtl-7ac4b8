// tb_cfg_decoder: checks that a configuration write of (FPGAX, FPGAY,
// FPGAZ, data) reappears one clock later with exactly one row and one
// column selected, and that out-of-array or idle cycles select nothing.
module tb_cfg_decoder;
  import bist_pkg::*;
  localparam int N = 48;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [23:0] wr_addr = '0;
  logic [7:0]  wr_data = '0;
  cfg_wr_t     cfg;
  logic [N-1:0] row_sel, col_sel;
  int checks = 0, failures = 0;

  cfg_decoder #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y, z, d;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      x = $urandom % 56; y = $urandom % 56; z = $urandom % 4; d = $urandom % 256;
      @(negedge clk);
      wr_en = ($urandom % 4 != 0);
      wr_addr = {8'(z), 8'(y), 8'(x)};
      wr_data = 8'(d);
      @(negedge clk);
      checks++;
      if (cfg.we != wr_en || cfg.x != 8'(x) || cfg.y != 8'(y) || cfg.z != 8'(z) || cfg.data != 8'(d))
        failures++;
      checks++;
      if (wr_en && x < N) begin
        if (col_sel != (N'(1) << x)) failures++;
      end else if (col_sel != '0) failures++;
      checks++;
      if (wr_en && y < N) begin
        if (row_sel != (N'(1) << y)) failures++;
      end else if (row_sel != '0) failures++;
      wr_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
