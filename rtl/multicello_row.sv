// multicello_row: MULTICELLO diagnosis of one row of cells under test.
//
// A row holds NB cells (PLBs under test, or RAMs) with one ORA between each
// pair of neighbours: ora[j] compares cell j and cell j+1, and a 1 means it
// saw a mismatch. The procedure assumes at most two consecutive cells with
// equivalent faults. Starting with every cell unknown, the steps are applied
// once each, in order (this is the document's procedure):
//   step 2  a cell between two passing ORAs is fault-free;
//   step 3  an unknown cell behind a passing ORA whose other neighbour is
//           fault-free is fault-free;
//   step 4  an unknown cell behind a failing ORA whose other neighbour is
//           fault-free is faulty;
//   step 5  a failing ORA between two fault-free cells is inconsistent: the
//           fault is in the ORA or in its routing.
// Cells left unknown may be faulty (typically at the row ends, which only
// one ORA observes). `unique_diag` is high when no cell is left unknown.
// A single pass of each step is complete: a cell fixed by step 3 whose other
// ORA also passes was already fixed by step 2. Purely combinational.
module multicello_row
  import bist_pkg::*;
#(
  parameter int unsigned NB = 24
) (
  input  logic [NB-2:0]  ora,
  output cell_status_e   st     [NB],
  output logic [NB-2:0]  incons,
  output logic           unique_diag
);
  cell_status_e s2 [NB];
  cell_status_e s3 [NB];

  always_comb begin
    // Step 2
    for (int j = 0; j < NB; j++) begin
      s2[j] = ST_UNKNOWN;
      if (j > 0 && j < NB - 1)
        if (!ora[j-1] && !ora[j]) s2[j] = ST_GOOD;
    end
    // Step 3
    for (int j = 0; j < NB; j++) begin
      s3[j] = s2[j];
      if (s2[j] == ST_UNKNOWN) begin
        if (j > 0 && s2[j-1] == ST_GOOD && !ora[j-1])    s3[j] = ST_GOOD;
        if (j < NB - 1 && s2[j+1] == ST_GOOD && !ora[j]) s3[j] = ST_GOOD;
      end
    end
    // Step 4
    for (int j = 0; j < NB; j++) begin
      st[j] = s3[j];
      if (s3[j] == ST_UNKNOWN) begin
        if (j > 0 && s3[j-1] == ST_GOOD && ora[j-1])    st[j] = ST_FAULTY;
        if (j < NB - 1 && s3[j+1] == ST_GOOD && ora[j]) st[j] = ST_FAULTY;
      end
    end
    // Step 5
    for (int j = 0; j < NB - 1; j++)
      incons[j] = ora[j] && st[j] == ST_GOOD && st[j+1] == ST_GOOD;
    // Step 6
    unique_diag = 1'b1;
    for (int j = 0; j < NB; j++)
      if (st[j] == ST_UNKNOWN) unique_diag = 1'b0;
  end
endmodule
