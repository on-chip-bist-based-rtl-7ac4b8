// tb_free_ram: exercises the 32 x 4 free RAM in its three modes against an
// array model: synchronous dual-port (separate read address, one-clock read
// latency), synchronous single-port and asynchronous single-port (read data
// in the same cycle), and checks the stuck-bit fault emulation.
module tb_free_ram;
  import bist_pkg::*;
  logic clk = 0, we = 0;
  ram_mode_e mode = RAM_DP_SYNC;
  logic [4:0] waddr = 0, raddr = 0;
  logic [3:0] wdata = 0, rdata;
  ram_fault_t flt = '0;
  int checks = 0, failures = 0;

  free_ram dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] model [32];

  initial begin
    logic [3:0] exp_q;
    // Fill every word (dual-port write port).
    mode = RAM_DP_SYNC;
    for (int a = 0; a < 32; a++) begin
      @(negedge clk); we = 1; waddr = 5'(a); wdata = 4'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    // Dual-port: simultaneous random write and read at different addresses.
    for (int t = 0; t < 300; t++) begin
      raddr = 5'($urandom); waddr = 5'($urandom); wdata = 4'($urandom); we = 1'($urandom);
      exp_q = model[raddr];
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
      checks++; if (rdata != exp_q) failures++;
      @(negedge clk);
    end
    // Synchronous single-port: the address is waddr, read-before-write.
    mode = RAM_SP_SYNC; we = 0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      waddr = 5'($urandom); wdata = 4'($urandom); we = 1'($urandom);
      exp_q = model[waddr];
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
      checks++; if (rdata != exp_q) failures++;
    end
    // Asynchronous single-port: data follows the address at once.
    @(negedge clk); mode = RAM_SP_ASYNC; we = 0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      waddr = 5'($urandom); #1;
      checks++; if (rdata != model[waddr]) failures++;
      wdata = 4'($urandom); we = 1'($urandom);
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
      we = 0; #1;
      checks++; if (rdata != model[waddr]) failures++;
    end
    // Fault emulation: bit 2 of word 7 stuck at 1.
    @(negedge clk);
    flt = '{en: 1'b1, addr: 5'd7, mask: 4'b0100, val: 4'b0100};
    waddr = 5'd7; wdata = 4'b0000; we = 1;
    @(negedge clk); we = 0; #1;
    checks++; if (rdata != 4'b0100) failures++;
    waddr = 5'd8; #1;
    checks++; if (rdata != model[8]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
