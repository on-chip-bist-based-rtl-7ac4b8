// tb_diag_engine: feeds ORA result streams into the diagnosis engine
// (N = 28: 28 x 28 PLBs, 7 x 7 RAMs) and compares its reports with outcomes
// worked out by hand from the diagnosis rules.
//  - dual-port RAM: the 7 x 7 worked example on data bit 0 (6 faulty,
//    6 unknown, one inconsistent ORA between RAM columns 3 and 4 of row 7);
//  - single-port RAM: each failing ORA names its RAM and bit;
//  - logic, west session, routing scheme 1: a PLB whose X and Y outputs both
//    fail is found at its physical row and column, an isolated failing ORA
//    is reported as inconsistent;
//  - logic, east session, routing scheme 2: the same for the mirrored
//    layout, plus an edge BUT seen by a single ORA.
//  - rotated dual-port RAM: reports in exchanged coordinates.
// The report stream is read with a random ready signal; the number of shift
// clocks and, with ready always high, the length of the scan are checked.
module tb_diag_engine;
  import bist_pkg::*;
  localparam int N  = 28;
  localparam int NB = N / 2;
  localparam int NO = NB - 1;
  localparam int R  = N / 4;
  localparam int MAXB = N * NO;

  logic clk = 0, rst_n = 0, start = 0, session = 0, scheme = 0, rotate = 0, rpt_ready = 1;
  diag_kind_e kind = DK_LOGIC;
  logic shift, shift_in, rpt_valid, busy, done, unique_diag;
  report_t rpt;
  logic [15:0] n_faulty, n_unknown, n_incons;
  int checks = 0, failures = 0;

  diag_engine #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ORA chain model: bit 0 first, one bit per shift clock.
  logic [MAXB-1:0] chain;
  int shifts;
  assign shift_in = chain[0];
  always @(posedge clk) if (shift) begin chain <= chain >> 1; shifts++; end

  report_t got [$];
  logic    rand_ready = 0;
  always @(posedge clk) begin
    if (rpt_valid && rpt_ready) got.push_back(rpt);
  end
  always @(negedge clk) rpt_ready <= rand_ready ? 1'($urandom) : 1'b1;

  function automatic report_t mk(rpt_cat_e c, int r, int col, logic [3:0] b);
    report_t x;
    x.cat = c; x.row = 8'(r); x.col = 8'(col); x.bits = b;
    return x;
  endfunction

  task automatic run_diag(input diag_kind_e k, input logic s, input logic sc,
                          input logic [MAXB-1:0] bits, input int nbits, input report_t exp_q [$],
                          input int scan_len);
    int t0, t_end;
    @(negedge clk);
    chain = bits; shifts = 0; got.delete();
    kind = k; session = s; scheme = sc; start = 1;
    @(negedge clk); start = 0;
    t0 = $time;
    while (!done) @(negedge clk);
    t_end = $time;
    checks++;
    if (shifts != nbits) begin failures++; $display("shifts %0d exp %0d", shifts, nbits); end
    if (!rand_ready) begin
      // start->SHIFT, nbits shift clocks, scan_len scan clocks, then done.
      checks++;
      if ((t_end - t0) / 10 != nbits + scan_len + 1) begin
        failures++; $display("cycles %0d exp %0d", (t_end - t0) / 10, nbits + scan_len + 1);
      end
    end
    checks++;
    if (got.size() != exp_q.size()) begin
      failures++; $display("kind %0d: %0d reports, expected %0d", k, got.size(), exp_q.size());
    end
    foreach (exp_q[i]) begin
      int hit;
      hit = 0;
      foreach (got[g]) if (got[g] == exp_q[i]) hit = 1;
      checks++;
      if (!hit) begin
        failures++;
        $display("missing report cat %0d row %0d col %0d bits %b", exp_q[i].cat, exp_q[i].row, exp_q[i].col, exp_q[i].bits);
      end
    end
  endtask

  initial begin
    logic [MAXB-1:0] v;
    report_t e [$];
    logic [5:0] ex [7];
    int nf, nu;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- dual-port RAM, worked 7 x 7 example on bit 0 ----
    ex[0] = 6'b011000; ex[1] = 6'b001100; ex[2] = 6'b110011; ex[3] = 6'b000000;
    ex[4] = 6'b111000; ex[5] = 6'b000001; ex[6] = 6'b000100;
    v = '0;
    for (int r = 0; r < 7; r++)
      for (int j = 0; j < 6; j++)
        v[(r * 6 + j) * 4 + 0] = ex[r][j];
    e.delete();
    e.push_back(mk(RC_FAULTY, 0, 4, 4'b0001));
    e.push_back(mk(RC_UNKNOWN, 0, 5, 4'b0001)); e.push_back(mk(RC_UNKNOWN, 0, 6, 4'b0001));
    e.push_back(mk(RC_FAULTY, 1, 3, 4'b0001));
    e.push_back(mk(RC_UNKNOWN, 2, 0, 4'b0001)); e.push_back(mk(RC_FAULTY, 2, 1, 4'b0001));
    e.push_back(mk(RC_FAULTY, 2, 5, 4'b0001)); e.push_back(mk(RC_UNKNOWN, 2, 6, 4'b0001));
    e.push_back(mk(RC_FAULTY, 4, 4, 4'b0001));
    e.push_back(mk(RC_UNKNOWN, 4, 5, 4'b0001)); e.push_back(mk(RC_UNKNOWN, 4, 6, 4'b0001));
    e.push_back(mk(RC_FAULTY, 5, 0, 4'b0001));
    e.push_back(mk(RC_ORA_INC, 6, 2, 4'b0001));
    run_diag(DK_RAM_DP, 0, 0, v, 7 * 6 * 4, e, 7 * 13);
    checks++; if (n_faulty != 6 || n_unknown != 6 || n_incons != 1 || unique_diag) failures++;

    // Same example with a faulty bit 2 in RAM (row 1, col 7): a faulty bit
    // decides the RAM, and reports carry every faulty bit.
    // Bit 2 of row 1: only O67 fails, so R6 is fault-free (step 3) and R7
    // faulty (step 4); R7 is now reported faulty with bit 2 instead of
    // unknown with bit 0.
    v[(0 * 6 + 5) * 4 + 2] = 1;
    e[2] = mk(RC_FAULTY, 0, 6, 4'b0100);
    rand_ready = 1;
    run_diag(DK_RAM_DP, 0, 0, v, 7 * 6 * 4, e, 0);
    rand_ready = 0;
    checks++; if (n_faulty != 7 || n_unknown != 5 || n_incons != 1) failures++;

    // Rotated: the same results now describe columns, so every report comes
    // back with row and column exchanged.
    foreach (e[i]) begin
      logic [7:0] tmp;
      tmp = e[i].row; e[i].row = e[i].col; e[i].col = tmp;
    end
    rotate = 1;
    run_diag(DK_RAM_DP, 0, 0, v, 7 * 6 * 4, e, 7 * 13);
    rotate = 0;

    // ---- single-port RAM ----
    v = '0; e.delete(); nf = 0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < R; c++) begin
        logic [3:0] b;
        b = ($urandom % 4 == 0) ? 4'($urandom) : 4'b0;
        for (int k = 0; k < 4; k++) v[(r * R + c) * 4 + k] = b[k];
        if (b != 0) begin e.push_back(mk(RC_FAULTY, r, c, b)); nf++; end
      end
    run_diag(DK_RAM_SP, 0, 0, v, R * R * 4, e, R * R);
    checks++; if (n_faulty != 16'(nf) || n_incons != 0 || !unique_diag) failures++;

    // ---- logic, west session, scheme 1 ----
    // BUT (row 4, j 5) X and Y outputs fail: Y seen by ORA(4,5), X by ORA(5,4).
    v = '0; e.delete();
    v[4 * NO + 5] = 1; v[5 * NO + 4] = 1;
    v[10 * NO + 8] = 1;                                   // lone ORA(10,8)
    e.push_back(mk(RC_FAULTY, 4, 1 + 2 * 5, 4'b0001));
    e.push_back(mk(RC_ORA_INC, 10, 2 + 2 * 8, 4'b0001));
    run_diag(DK_LOGIC, 0, 0, v, N * NO, e, N * (NB + NO));
    checks++; if (n_faulty != 1 || n_unknown != 0 || n_incons != 1 || !unique_diag) failures++;

    // ---- logic, east session, scheme 2 ----
    // BUT (row 7, j 3) both outputs fail: Y seen by ORA(7,2), X by ORA(6,3).
    // ORA(0,12) fails alone: the edge BUT behind it (row 0, j 13, column 0)
    // is the faulty one by step 4.
    v = '0; e.delete();
    v[7 * NO + 2] = 1; v[6 * NO + 3] = 1;
    v[0 * NO + 12] = 1;
    e.push_back(mk(RC_FAULTY, 7, N - 2 - 2 * 3, 4'b0001));
    e.push_back(mk(RC_FAULTY, 0, 0, 4'b0001));
    rand_ready = 1;
    run_diag(DK_LOGIC, 1, 1, v, N * NO, e, 0);
    rand_ready = 0;
    checks++; if (n_faulty != 2 || n_incons != 0) failures++;

    // ---- logic, all pass ----
    v = '0; e.delete();
    run_diag(DK_LOGIC, 0, 1, v, N * NO, e, N * (NB + NO));
    checks++; if (!unique_diag || n_faulty != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
