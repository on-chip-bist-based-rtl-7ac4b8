// tb_diag_merge: checks the merging of RAM diagnosis passes.
//
// A 6 x 6 RAM array. First the two passes of the rotation example: one pass
// leaves a RAM unknown that the other finds faulty, and four RAMs unknown
// that the first found good; the merged map must be unique. Then random
// sequences of passes, each with random faulty, unknown and inconsistent
// reports, are compared after every pass with a reference model kept in
// the testbench (faulty if any pass said faulty, else good if any pass
// reported nothing for the RAM, else unknown). `clr` is checked to return
// every RAM to unknown.
module tb_diag_merge;
  import bist_pkg::*;
  localparam int R = 6;

  logic clk = 0, rst_n = 0, clr = 0, rpt_fire = 0, pass_done = 0;
  report_t rpt = '0;
  cell_status_e status [R][R];
  logic resolved;
  int checks = 0, failures = 0;

  diag_merge #(.R(R)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit mf [R][R], mg [R][R];

  task automatic send(input rpt_cat_e cat, input int r, input int c);
    @(negedge clk);
    rpt = '{cat: cat, row: 8'(r), col: 8'(c), bits: 4'b0001};
    rpt_fire = 1;
    @(negedge clk) rpt_fire = 0;
  endtask

  task automatic end_pass();
    @(negedge clk) pass_done = 1;
    @(negedge clk) pass_done = 0;
  endtask

  task automatic compare(input string what);
    int bad = 0;
    bit all_known = 1;
    for (int r = 0; r < R; r++) for (int c = 0; c < R; c++) begin
      cell_status_e e = mf[r][c] ? ST_FAULTY : mg[r][c] ? ST_GOOD : ST_UNKNOWN;
      if (e == ST_UNKNOWN) all_known = 0;
      if (status[r][c] != e) bad++;
    end
    checks++;
    if (bad != 0 || resolved != all_known) begin
      failures++; $display("%s: %0d RAMs differ, resolved %0b expected %0b", what, bad, resolved, all_known);
    end
  endtask

  task automatic clear_all();
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    for (int r = 0; r < R; r++) for (int c = 0; c < R; c++) begin mf[r][c] = 0; mg[r][c] = 0; end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    compare("after reset");

    // Normal pass: (2,0) unknown, (2,1) faulty.
    send(RC_UNKNOWN, 2, 0); send(RC_FAULTY, 2, 1); end_pass();
    checks++;
    if (resolved || status[2][0] != ST_UNKNOWN || status[2][1] != ST_FAULTY || status[0][0] != ST_GOOD) begin
      failures++; $display("first pass wrong");
    end
    // Rotated pass: both faulty, the corner RAMs unknown; an inconsistent
    // ORA report must not change anything.
    send(RC_FAULTY, 2, 0); send(RC_FAULTY, 2, 1);
    send(RC_UNKNOWN, 0, 0); send(RC_UNKNOWN, 1, 0); send(RC_UNKNOWN, 0, 1); send(RC_UNKNOWN, 1, 1);
    send(RC_ORA_INC, 4, 4);
    end_pass();
    checks++;
    if (!resolved || status[2][0] != ST_FAULTY || status[2][1] != ST_FAULTY ||
        status[0][0] != ST_GOOD || status[1][1] != ST_GOOD || status[4][4] != ST_GOOD) begin
      failures++; $display("merged passes wrong");
    end

    // Random passes.
    for (int seq = 0; seq < 20; seq++) begin
      clear_all();
      compare("after clr");
      for (int p = 0; p < 1 + $urandom_range(2); p++) begin
        automatic bit pf [R][R], pu [R][R];
        for (int r = 0; r < R; r++) for (int c = 0; c < R; c++) begin pf[r][c] = 0; pu[r][c] = 0; end
        for (int k = 0; k < $urandom_range(12); k++) begin
          automatic int r = $urandom_range(R - 1), c = $urandom_range(R - 1);
          automatic int which = $urandom_range(2);
          if (which == 0) begin send(RC_FAULTY, r, c); pf[r][c] = 1; end
          else if (which == 1) begin send(RC_UNKNOWN, r, c); pu[r][c] = 1; end
          else send(RC_ORA_INC, r, c);
        end
        // A report outside the array is ignored.
        send(RC_FAULTY, R + 1, 0);
        end_pass();
        for (int r = 0; r < R; r++) for (int c = 0; c < R; c++) begin
          mf[r][c] |= pf[r][c];
          mg[r][c] |= !pf[r][c] && !pu[r][c];
        end
        compare($sformatf("sequence %0d pass %0d", seq, p));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
