// tb_ram_bist_array: RAM BIST of a 4 x 4 array of free RAMs, with the
// testbench playing the processor as test pattern generator.
//  - synchronous single-port: March LR with three data backgrounds;
//  - asynchronous single-port: March Y;
//  - synchronous dual-port: write a background through the write port,
//    then read each word through the read port while the write port writes
//    the complement of the previous word, then read the complements.
// Fault-free, no ORA fails. With one emulated stuck bit, single-port BIST
// flags exactly that RAM's ORA for that bit, and dual-port BIST flags the
// ORAs on both sides of the RAM for that bit, along its row or, rotated,
// along its column. Equivalent faults in two neighbouring RAMs escape the
// ORA between them but not their other neighbours' ORAs.
module tb_ram_bist_array;
  import bist_pkg::*;
  localparam int N = 16;
  localparam int R = N / 4;
  localparam int NSP = R * R * 4;
  localparam int NDP = R * (R - 1) * 4;

  logic clk = 0, rst_n = 0;
  ram_mode_e mode = RAM_SP_SYNC;
  logic we = 0, rotate = 0, cmp = 0, ora_clr = 0, shift = 0, shift_out;
  logic [4:0] waddr = 0, raddr = 0;
  logic [3:0] wdata = 0, exp_data = 0;
  ram_fault_t flt [R][R];
  int checks = 0, failures = 0;

  ram_bist_array #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Pending compare of a synchronous read, due one clock later.
  logic       pend = 0;
  logic [3:0] pend_exp = 0;

  // One single-port operation: a write (rd = 0) or a read expecting e.
  task automatic sp_op(input logic rd, input int a, input logic [3:0] d);
    @(negedge clk);
    waddr = 5'(a);
    we    = !rd;
    wdata = d;
    if (mode == RAM_SP_ASYNC) begin
      cmp = rd; exp_data = d;
    end else begin
      cmp = pend; exp_data = pend_exp;
      pend = rd; pend_exp = d;
    end
  endtask

  task automatic sp_flush();
    @(negedge clk);
    we = 0; cmp = pend; exp_data = pend_exp; pend = 0;
    @(negedge clk);
    cmp = 0;
  endtask

  // March element over all addresses; ops: string of r0/r1/w0/w1 letters.
  task automatic march(input bit down, input string ops, input logic [3:0] bg);
    for (int i = 0; i < 32; i++) begin
      int a;
      a = down ? 31 - i : i;
      for (int k = 0; k < ops.len(); k += 2)
        sp_op(ops[k] == "r", a, (ops[k+1] == "1") ? ~bg : bg);
    end
  endtask

  task automatic march_lr(input logic [3:0] bg);
    march(0, "w0", bg);
    march(1, "r0w1", bg);
    march(0, "r1w0r0w1", bg);
    march(0, "r1w0", bg);
    march(0, "r0w1r1w0", bg);
    march(0, "r0", bg);
    sp_flush();
  endtask

  task automatic march_y();
    march(0, "w0", 4'h0);
    march(0, "r0w1r1", 4'h0);
    march(1, "r1w0r0", 4'h0);
    march(0, "r0", 4'h0);
    sp_flush();
  endtask

  task automatic dp_test(input logic [3:0] bg);
    for (int a = 0; a < 32; a++) begin
      @(negedge clk); we = 1; waddr = 5'(a); wdata = 4'(a) ^ bg; cmp = 0;
    end
    for (int a = 0; a <= 32; a++) begin
      @(negedge clk);
      cmp = (a > 0);                       // data of the read issued last clock
      raddr = 5'(a);
      we = (a > 0); waddr = 5'(a - 1); wdata = ~(4'(a - 1) ^ bg);
    end
    for (int a = 0; a <= 32; a++) begin
      @(negedge clk);
      we = 0; cmp = (a > 0); raddr = 5'(a);
    end
    @(negedge clk); cmp = 0;
  endtask

  task automatic read_chain(input int n, output logic [NSP-1:0] v);
    v = '0;
    @(negedge clk); shift = 1;
    for (int p = 0; p < n; p++) begin v[p] = shift_out; @(negedge clk); end
    shift = 0;
  endtask

  task automatic clear_oras();
    @(negedge clk); ora_clr = 1; @(negedge clk); ora_clr = 0;
  endtask

  task automatic run_all_sp_sync();
    march_lr(4'b0000); march_lr(4'b0101); march_lr(4'b0011);
  endtask

  initial begin
    logic [NSP-1:0] v, e;
    for (int r = 0; r < R; r++) for (int c = 0; c < R; c++) flt[r][c] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // Fault-free, three configurations.
    mode = RAM_SP_SYNC;  clear_oras(); run_all_sp_sync(); read_chain(NSP, v);
    checks++; if (v != '0) begin failures++; $display("sp sync ff %b", v); end
    mode = RAM_SP_ASYNC; clear_oras(); march_y(); read_chain(NSP, v);
    checks++; if (v != '0) begin failures++; $display("sp async ff %b", v); end
    mode = RAM_DP_SYNC;  clear_oras(); dp_test(4'h0); read_chain(NDP, v);
    checks++; if (v != '0) begin failures++; $display("dp ff %b", v); end

    for (int t = 0; t < 6; t++) begin
      int r, c, b, a;
      r = $urandom % R; c = $urandom % R; b = $urandom % 4; a = $urandom % 32;
      flt[r][c] = '{en: 1'b1, addr: 5'(a), mask: 4'(1 << b), val: 4'($urandom)};
      e = '0; e[(r * R + c) * 4 + b] = 1;
      mode = (t % 2) ? RAM_SP_ASYNC : RAM_SP_SYNC;
      clear_oras();
      if (t % 2) march_y(); else run_all_sp_sync();
      read_chain(NSP, v);
      checks++; if (v != e) begin failures++; $display("sp fault %0d %0d %0d: %b", r, c, b, v); end

      mode = RAM_DP_SYNC;
      e = '0;
      if (c > 0)     e[(r * (R - 1) + c - 1) * 4 + b] = 1;
      if (c < R - 1) e[(r * (R - 1) + c) * 4 + b] = 1;
      clear_oras(); dp_test(4'h0); read_chain(NDP, v);
      checks++; if (v != e) begin failures++; $display("dp fault %0d %0d %0d: %b", r, c, b, v); end
      // Rotated dual-port: RAM (r,c) is cell r of chain row c.
      rotate = 1;
      e = '0;
      if (r > 0)     e[(c * (R - 1) + r - 1) * 4 + b] = 1;
      if (r < R - 1) e[(c * (R - 1) + r) * 4 + b] = 1;
      clear_oras(); dp_test(4'h0); read_chain(NDP, v);
      checks++; if (v != e) begin failures++; $display("dp rot fault %0d %0d %0d: %b", r, c, b, v); end
      rotate = 0;
      flt[r][c] = '0;
    end
    // Equivalent faults in two neighbouring RAMs: the ORA between them sees
    // nothing, but each RAM's other neighbour ORA still fails.
    flt[1][1] = '{en: 1'b1, addr: 5'd9, mask: 4'b1000, val: 4'b1000};
    flt[1][2] = '{en: 1'b1, addr: 5'd9, mask: 4'b1000, val: 4'b1000};
    mode = RAM_DP_SYNC;
    clear_oras(); dp_test(4'h0); read_chain(NDP, v);
    e = '0;
    e[(1 * (R - 1) + 0) * 4 + 3] = 1;
    e[(1 * (R - 1) + 2) * 4 + 3] = 1;
    checks++; if (v != e) begin failures++; $display("dp equivalent faults: %b", v); end
    flt[1][1] = '0; flt[1][2] = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
