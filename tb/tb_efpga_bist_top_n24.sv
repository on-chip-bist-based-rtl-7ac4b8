// tb_efpga_bist_top_n24: the end-to-end test of tb_efpga_bist_top on the
// smaller device size, 24 x 24 PLBs and 6 x 6 free RAMs, checking the same
// outcomes. The description of that test, written for the 48 x 48 size:
//
// tb_efpga_bist_top: end-to-end BIST and diagnosis of the full-size
// embedded FPGA core (48 x 48 PLBs, 12 x 12 free RAMs), with the testbench
// playing the embedded processor.
//
// Logic BIST: for each test session (west, east) and each routing scheme,
// the BUT columns are partially reconfigured through the configuration
// write port for four BIST configurations, the TPGs run 32 clocks per
// configuration, and the diagnosis engine retrieves and diagnoses the ORA
// results. Emulated defects: PLB (10,11) has one corrupted entry in both
// LUTs (a west-session BUT, found faulty in both schemes); PLB (14,12) has a
// corrupted Y LUT only (an east-session BUT whose Y output one ORA sees, so
// the procedure reports that ORA as inconsistent).
// RAM BIST: synchronous single-port (March LR, three backgrounds),
// asynchronous single-port (March Y) and synchronous dual-port, with stuck
// bits emulated in RAMs (2,0) and (2,1); dual-port diagnosis leaves the
// edge RAM (2,0) unknown, single-port diagnosis finds both.
// Both arrangements are also run rotated by 90 degrees (logic: east
// session; RAM: dual-port), which resolves the RAM left unknown; the merged
// RAM status map must then hold exactly the two faulty RAMs, all others
// good, with nothing unknown.
// Every mechanism (rotation, partial reconfiguration, each session/scheme, TPG wrap,
// each RAM mode, retrieval, each report category, report back-pressure,
// a RAM left unknown resolved by merging passes) is
// counted and must occur.
module tb_efpga_bist_top_n24;
  import bist_pkg::*;
  localparam int N  = 24;
  localparam int NB = N / 2;
  localparam int R  = N / 4;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [23:0] cfg_addr = '0;
  logic [7:0]  cfg_data = '0;
  logic session = 0, scheme = 0, rotate = 0, tpg_clr = 0, logic_run = 0, ora_clr = 0, tpg_wrap;
  ram_mode_e ram_mode = RAM_SP_SYNC;
  logic ram_we = 0, ram_cmp = 0;
  logic [4:0] ram_waddr = 0, ram_raddr = 0;
  logic [3:0] ram_wdata = 0, ram_exp = 0;
  ram_fault_t ram_flt [R][R];
  logic diag_start = 0, rpt_ready = 1;
  diag_kind_e diag_kind = DK_LOGIC;
  report_t rpt;
  logic rpt_valid, diag_busy, diag_done, diag_unique;
  logic [15:0] n_faulty, n_unknown, n_incons;
  logic ram_map_clr = 0, ram_resolved;
  cell_status_e ram_status [R][R];
  int checks = 0, failures = 0;

  efpga_bist_top #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int n_cfg_writes = 0, n_wraps = 0, n_sessions [2][2], n_ram_modes [3];
  int n_rotated = 0, n_retrievals = 0, n_cat [4], n_backpressure = 0, n_merged = 0;
  always @(posedge clk) begin
    if (cfg_we) n_cfg_writes++;
    if (tpg_wrap) n_wraps++;
    if (rpt_valid && !rpt_ready) n_backpressure++;
  end

  report_t got [$];
  report_t dp_normal [$];
  always @(posedge clk) if (rpt_valid && rpt_ready) begin
    got.push_back(rpt);
    n_cat[rpt.cat]++;
  end
  always @(negedge clk) rpt_ready <= 1'($urandom);

  // ---------------------------------------------------------------- logic
  function automatic logic [23:0] bist_cfg(input int k);
    plb_mode_t m;
    logic [7:0] lut;
    m = '0;
    lut = (k == 1) ? 8'hE8 : 8'h96;
    if (k >= 2) begin m.x_reg = 1; m.y_reg = 1; end
    if (k == 3) begin m.ff_src = FF_Z; m.sr_en = 1; m.sr_val = 1; end
    return {m, lut, lut};
  endfunction

  task automatic wr(input int r, input int c, input logic [7:0] z, input logic [7:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = {z, 8'(r), 8'(c)}; cfg_data = d;
  endtask

  // Partial reconfiguration of the session's BUT columns. Defects are
  // emulated by flipping LUT entry 0 of the defective PLBs.
  task automatic config_buts(input logic east, input int k, input logic rot = 0);
    logic [23:0] c;
    c = bist_cfg(k);
    for (int r = 0; r < N; r++)
      for (int j = 0; j < NB; j++) begin
        int col;
        logic [7:0] xl, yl;
        int pr, pc;
        col = east ? N - 2 - 2 * j : 1 + 2 * j;
        pr = rot ? col : r;
        pc = rot ? r : col;
        xl = c[7:0]; yl = c[15:8];
        if (pr == 10 && pc == 11) begin xl ^= 8'h01; yl ^= 8'h01; end
        if (pr == 14 && pc == 12) yl ^= 8'h01;
        wr(pr, pc, Z_XLUT, xl);
        wr(pr, pc, Z_YLUT, yl);
        wr(pr, pc, Z_MODE, c[23:16]);
      end
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic run_tpg();
    @(negedge clk); tpg_clr = 1; @(negedge clk); tpg_clr = 0;
    logic_run = 1; repeat (32) @(negedge clk); logic_run = 0;
  endtask

  task automatic clear_oras();
    @(negedge clk); ora_clr = 1; @(negedge clk); ora_clr = 0;
  endtask

  task automatic diagnose(input diag_kind_e k);
    @(negedge clk);
    got.delete();
    diag_kind = k; diag_start = 1;
    @(negedge clk); diag_start = 0;
    while (!diag_done) @(negedge clk);
    n_retrievals++;
  endtask

  function automatic bit has(input rpt_cat_e c, input int r, input int col, input logic [3:0] b);
    foreach (got[i]) if (got[i].cat == c && got[i].row == 8'(r) && got[i].col == 8'(col) && got[i].bits == b) return 1;
    return 0;
  endfunction

  // ------------------------------------------------------------------ RAM
  logic pend = 0;
  logic [3:0] pend_exp = 0;

  task automatic sp_op(input logic rd, input int a, input logic [3:0] d);
    @(negedge clk);
    ram_waddr = 5'(a); ram_we = !rd; ram_wdata = d;
    if (ram_mode == RAM_SP_ASYNC) begin
      ram_cmp = rd; ram_exp = d;
    end else begin
      ram_cmp = pend; ram_exp = pend_exp; pend = rd; pend_exp = d;
    end
  endtask

  task automatic sp_flush();
    @(negedge clk); ram_we = 0; ram_cmp = pend; ram_exp = pend_exp; pend = 0;
    @(negedge clk); ram_cmp = 0;
  endtask

  task automatic march(input bit down, input string ops, input logic [3:0] bg);
    for (int i = 0; i < 32; i++)
      for (int k = 0; k < ops.len(); k += 2)
        sp_op(ops[k] == "r", down ? 31 - i : i, (ops[k+1] == "1") ? ~bg : bg);
  endtask

  task automatic march_lr(input logic [3:0] bg);
    march(0, "w0", bg); march(1, "r0w1", bg); march(0, "r1w0r0w1", bg);
    march(0, "r1w0", bg); march(0, "r0w1r1w0", bg); march(0, "r0", bg);
    sp_flush();
  endtask

  task automatic march_y();
    march(0, "w0", 4'h0); march(0, "r0w1r1", 4'h0); march(1, "r1w0r0", 4'h0); march(0, "r0", 4'h0);
    sp_flush();
  endtask

  // Merged RAM status: RAMs (2,0) and (2,1) faulty, all others good.
  task automatic check_map(input string what);
    int bad = 0;
    repeat (2) @(negedge clk);
    for (int r = 0; r < R; r++) for (int c = 0; c < R; c++)
      if (ram_status[r][c] != (((r == 2) && (c <= 1)) ? ST_FAULTY : ST_GOOD)) bad++;
    checks++;
    if (bad != 0 || !ram_resolved) begin
      failures++; $display("%s: merged map has %0d wrong RAMs, resolved %0b", what, bad, ram_resolved);
    end
  endtask

  task automatic map_clear();
    @(negedge clk) ram_map_clr = 1;
    @(negedge clk) ram_map_clr = 0;
  endtask

  task automatic dp_test(input logic [3:0] bg);
    for (int a = 0; a < 32; a++) begin
      @(negedge clk); ram_we = 1; ram_waddr = 5'(a); ram_wdata = 4'(a) ^ bg; ram_cmp = 0;
    end
    for (int a = 0; a <= 32; a++) begin
      @(negedge clk);
      ram_cmp = (a > 0); ram_raddr = 5'(a);
      ram_we = (a > 0); ram_waddr = 5'(a - 1); ram_wdata = ~(4'(a - 1) ^ bg);
    end
    for (int a = 0; a <= 32; a++) begin
      @(negedge clk); ram_we = 0; ram_cmp = (a > 0); ram_raddr = 5'(a);
    end
    @(negedge clk); ram_cmp = 0;
  endtask

  initial begin
    time t0;
    for (int r = 0; r < R; r++) for (int c = 0; c < R; c++) ram_flt[r][c] = '0;
    ram_flt[2][0] = '{en: 1'b1, addr: 5'd3,  mask: 4'b0001, val: 4'b0001};
    ram_flt[2][1] = '{en: 1'b1, addr: 5'd17, mask: 4'b0001, val: 4'b0000};
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ------------------------------------------------ logic BIST
    for (int s = 0; s < 2; s++)
      for (int sc = 0; sc < 2; sc++) begin
        session = s[0]; scheme = sc[0];
        clear_oras();
        t0 = $time;
        for (int k = 0; k < 4; k++) begin config_buts(session, k); run_tpg(); end
        $display("session %0d scheme %0d: BIST sequence %0d clocks", s, sc + 1, ($time - t0) / 10);
        t0 = $time;
        diagnose(DK_LOGIC);
        $display("  diagnosis %0d clocks, %0d faulty %0d unknown %0d inconsistent",
                 ($time - t0) / 10, n_faulty, n_unknown, n_incons);
        n_sessions[s][sc]++;
        if (s == 0) begin
          checks++;
          if (!has(RC_FAULTY, 10, 11, 4'b0001) || got.size() != 1) begin
            failures++; $display("west: expected PLB (10,11) faulty only, %0d reports", got.size());
          end
        end else if (sc == 0) begin
          // Y of BUT (14, column 12) is seen by the ORA at column 11.
          checks++;
          if (!has(RC_ORA_INC, 14, 11, 4'b0001) || got.size() != 1) begin
            failures++; $display("east scheme 1: expected ORA (14,11) inconsistent, %0d reports", got.size());
          end
        end else begin
          // Scheme 2: the Y output goes to the ORA at column 13.
          checks++;
          if (!has(RC_ORA_INC, 14, 13, 4'b0001) || got.size() != 1) begin
            failures++; $display("east scheme 2: expected ORA (14,13) inconsistent, %0d reports", got.size());
          end
        end
      end

    // Rotated east session, scheme 1: BUTs are PLB rows 46, 44, .., 0.
    // PLB (10,11) is a BUT of frame row 11 -> faulty at (10,11); PLB (14,12)
    // is a BUT of frame row 12 with only Y corrupt -> the ORA after it in frame row 12,
    // PLB (13,12), inconsistent.
    session = 1; scheme = 0; rotate = 1;
    clear_oras();
    for (int k = 0; k < 4; k++) begin config_buts(1, k, 1); run_tpg(); end
    diagnose(DK_LOGIC); n_rotated++;
    checks++;
    if (!has(RC_FAULTY, 10, 11, 4'b0001) || !has(RC_ORA_INC, 13, 12, 4'b0001) || got.size() != 2) begin
      failures++; $display("rotated east: %0d reports", got.size());
      foreach (got[i]) $display("  cat %0d row %0d col %0d", got[i].cat, got[i].row, got[i].col);
    end
    rotate = 0;

    // ------------------------------------------------ RAM BIST
    ram_mode = RAM_SP_SYNC; clear_oras(); map_clear();
    march_lr(4'b0000); march_lr(4'b0101); march_lr(4'b0011);
    diagnose(DK_RAM_SP); n_ram_modes[1]++;
    check_map("sp sync");
    checks++;
    if (!has(RC_FAULTY, 2, 0, 4'b0001) || !has(RC_FAULTY, 2, 1, 4'b0001) || got.size() != 2) begin
      failures++; $display("sp sync: %0d reports", got.size());
    end
    ram_mode = RAM_SP_ASYNC; clear_oras();
    march_y();
    diagnose(DK_RAM_SP); n_ram_modes[2]++;
    checks++;
    if (!has(RC_FAULTY, 2, 0, 4'b0001) || !has(RC_FAULTY, 2, 1, 4'b0001) || got.size() != 2) begin
      failures++; $display("sp async: %0d reports", got.size());
    end
    ram_mode = RAM_DP_SYNC; clear_oras(); map_clear();
    dp_test(4'h0);
    diagnose(DK_RAM_DP); n_ram_modes[0]++;
    repeat (2) @(negedge clk);
    checks++;
    if (ram_resolved || ram_status[2][0] != ST_UNKNOWN || ram_status[2][1] != ST_FAULTY ||
        ram_status[0][0] != ST_GOOD) begin
      failures++; $display("dp: merged map after one pass is wrong");
    end
    checks++;
    if (!has(RC_UNKNOWN, 2, 0, 4'b0001) || !has(RC_FAULTY, 2, 1, 4'b0001) || got.size() != 2) begin
      failures++; $display("dp: %0d reports", got.size());
      foreach (got[i]) $display("  cat %0d row %0d col %0d bits %b", got[i].cat, got[i].row, got[i].col, got[i].bits);
    end
    checks++; if (diag_unique) failures++;
    // Rotated dual-port: RAM (2,0) is no longer at an edge and is found
    // faulty; RAMs (0,0), (1,0), (0,1), (1,1) are now the unknown ones, and
    // the unrotated run found them fault-free, so the two runs together
    // give a unique diagnosis.
    dp_normal = got;
    rotate = 1; clear_oras();
    dp_test(4'h0);
    diagnose(DK_RAM_DP); n_rotated++;
    rotate = 0;
    check_map("dp normal + rotated"); if (ram_resolved) n_merged++;
    checks++;
    if (!has(RC_FAULTY, 2, 0, 4'b0001) || !has(RC_FAULTY, 2, 1, 4'b0001) ||
        !has(RC_UNKNOWN, 0, 0, 4'b0001) || !has(RC_UNKNOWN, 1, 0, 4'b0001) ||
        !has(RC_UNKNOWN, 0, 1, 4'b0001) || !has(RC_UNKNOWN, 1, 1, 4'b0001) || got.size() != 6) begin
      failures++; $display("dp rotated: %0d reports", got.size());
      foreach (got[i]) $display("  cat %0d row %0d col %0d bits %b", got[i].cat, got[i].row, got[i].col, got[i].bits);
    end
    foreach (got[i]) if (got[i].cat == RC_UNKNOWN) begin
      checks++;
      foreach (dp_normal[k]) if (dp_normal[k].row == got[i].row && dp_normal[k].col == got[i].col) failures++;
    end

    // ------------------------------------------------ mechanisms
    $display("config writes %0d, TPG wraps %0d, retrievals %0d, reports F/U/I %0d/%0d/%0d, back-pressure %0d, merged resolutions %0d",
             n_cfg_writes, n_wraps, n_retrievals, n_cat[RC_FAULTY], n_cat[RC_UNKNOWN], n_cat[RC_ORA_INC], n_backpressure, n_merged);
    checks++; if (n_cfg_writes == 0) failures++;
    checks++; if (n_wraps != 20) failures++;
    for (int s = 0; s < 2; s++) for (int sc = 0; sc < 2; sc++) begin checks++; if (n_sessions[s][sc] == 0) failures++; end
    for (int m = 0; m < 3; m++) begin checks++; if (n_ram_modes[m] == 0) failures++; end
    checks++; if (n_retrievals != 9) failures++;
    checks++; if (n_rotated != 2) failures++;
    checks++; if (n_merged != 1) failures++;
    for (int c = 1; c < 4; c++) begin checks++; if (n_cat[c] == 0) failures++; end
    checks++; if (n_backpressure == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
