// tb_multicello_row: checks the MULTICELLO row diagnosis on a 7 x 7 example
// array of dual-port RAMs whose expected outcome was worked out by hand
// (faulty, unknown and inconsistent cells per row), then checks the
// procedure's invariants on random ORA rows of the full 24-cell width.
module tb_multicello_row;
  import bist_pkg::*;

  int checks = 0, failures = 0;

  logic [5:0]   ora7;
  cell_status_e st7 [7];
  logic [5:0]   inc7;
  logic         uq7;

  multicello_row #(.NB(7)) dut7 (.ora(ora7), .st(st7), .incons(inc7), .unique_diag(uq7));

  logic [22:0]  ora24;
  cell_status_e st24 [24];
  logic [22:0]  inc24;
  logic         uq24;

  multicello_row #(.NB(24)) dut24 (.ora(ora24), .st(st24), .incons(inc24), .unique_diag(uq24));

  // Example rows: ORA results O12..O67 (index 0 = O12) and the expected
  // status string per RAM (R1 first): G fault-free, F faulty, U unknown.
  logic [5:0] ex_ora [7];
  string      ex_st  [7];
  logic [5:0] ex_inc [7];

  initial begin
    ex_ora[0] = 6'b011000; ex_st[0] = "GGGGFUU"; ex_inc[0] = 6'b000000;
    ex_ora[1] = 6'b001100; ex_st[1] = "GGGFGGG"; ex_inc[1] = 6'b000000;
    ex_ora[2] = 6'b110011; ex_st[2] = "UFGGGFU"; ex_inc[2] = 6'b000000;
    ex_ora[3] = 6'b000000; ex_st[3] = "GGGGGGG"; ex_inc[3] = 6'b000000;
    ex_ora[4] = 6'b111000; ex_st[4] = "GGGGFUU"; ex_inc[4] = 6'b000000;
    ex_ora[5] = 6'b000001; ex_st[5] = "FGGGGGG"; ex_inc[5] = 6'b000000;
    ex_ora[6] = 6'b000100; ex_st[6] = "GGGGGGG"; ex_inc[6] = 6'b000100;
  end

  function automatic byte code(cell_status_e s);
    return (s == ST_GOOD) ? "G" : (s == ST_FAULTY) ? "F" : "U";
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_good, n_faulty, n_unknown;
    n_good = 0; n_faulty = 0; n_unknown = 0;
    #1;
    for (int r = 0; r < 7; r++) begin
      ora7 = ex_ora[r];
      #1;
      for (int j = 0; j < 7; j++) begin
        checks++;
        if (code(st7[j]) != ex_st[r][j]) begin
          failures++;
          $display("row %0d R%0d: got %s expected %s", r + 1, j + 1, code(st7[j]), ex_st[r][j]);
        end
        if (st7[j] == ST_GOOD) n_good++;
        else if (st7[j] == ST_FAULTY) n_faulty++;
        else n_unknown++;
      end
      checks++;
      if (inc7 !== ex_inc[r]) begin failures++; $display("row %0d incons %b", r + 1, inc7); end
      checks++;
      if (uq7 != (ex_st[r].len() > 0 && !(ex_st[r][0] == "U" || ex_st[r][6] == "U" || ex_st[r][5] == "U"))) begin
        failures++; $display("row %0d unique %b", r + 1, uq7);
      end
    end
    // Totals of the example: 37 fault-free, 6 faulty, 6 unknown.
    checks++;
    if (n_good != 37 || n_faulty != 6 || n_unknown != 6) begin
      failures++; $display("totals %0d/%0d/%0d", n_good, n_faulty, n_unknown);
    end

    // Random rows: invariants of the procedure.
    for (int t = 0; t < 2000; t++) begin
      ora24 = {$urandom, $urandom} [22:0];
      if (t % 3 == 0) ora24 &= 23'($urandom) & 23'($urandom);
      #1;
      for (int j = 0; j < 23; j++) begin
        checks++;
        // A failing ORA between two fault-free cells is exactly an inconsistency.
        if (inc24[j] != (ora24[j] && st24[j] == ST_GOOD && st24[j+1] == ST_GOOD)) failures++;
        // A passing ORA never separates a fault-free cell from a faulty one.
        checks++;
        if (!ora24[j] && ((st24[j] == ST_GOOD && st24[j+1] == ST_FAULTY) ||
                          (st24[j] == ST_FAULTY && st24[j+1] == ST_GOOD))) failures++;
        // Two passing ORAs in a row prove the cell between them fault-free.
        if (j > 0) begin
          checks++;
          if (!ora24[j-1] && !ora24[j] && st24[j] != ST_GOOD) failures++;
        end
      end
      // A row with no failing ORA is fully fault-free.
      if (ora24 == '0) begin
        checks++;
        if (!uq24) failures++;
      end
    end
    ora24 = '0; #1;
    checks++;
    if (!uq24) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
