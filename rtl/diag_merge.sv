// diag_merge: combines the RAM diagnoses of several passes into one map.
//
// One MULTICELLO pass can leave RAMs near the array edge unknown, because
// only one comparison observes them. A second pass with the arrangement
// turned by 90 degrees, or a single-port RAM BIST pass, looks at every RAM
// from another side. This block keeps, for each of the R x R RAMs, two
// sticky flags over all passes since `clr`:
//   f  - reported faulty by some pass;
//   g  - neither faulty nor unknown in some pass, i.e. found good there.
// The merged status is FAULTY if f, else GOOD if g, else UNKNOWN (also the
// state after `clr`, before any pass). A RAM that one pass calls unknown and
// another calls good is therefore resolved as good, and one that any pass
// calls faulty stays faulty. Reports of inconsistent ORAs are about an ORA,
// not a RAM, and are ignored.
//
// Interface: `rpt_fire` marks a report accepted from the diagnosis engine
// (row and column in RAM units); `pass_done` pulses once after the last
// report of a pass (no report may come with it), which folds that pass
// into f and g. `status` and `resolved` (no RAM left unknown) are decoded
// from the f and g registers and change at the clock edge that takes
// `pass_done`.
//
// Combining the passes follows the document's description of how rotation
// and single-port results remove ambiguities; doing it in hardware rather
// than in the processor's program is this design's choice.
module diag_merge
  import bist_pkg::*;
#(
  parameter int unsigned R = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  report_t      rpt,
  input  logic         rpt_fire,
  input  logic         pass_done,
  output cell_status_e status [R][R],
  output logic         resolved
);
  localparam int RW = (R > 1) ? $clog2(R) : 1;

  logic          pf [R][R];  // faulty in the current pass
  logic          pu [R][R];  // unknown in the current pass
  logic          f  [R][R];
  logic          g  [R][R];
  logic [RW-1:0] rr, rc;
  logic          in_range;

  assign rr       = rpt.row[RW-1:0];
  assign rc       = rpt.col[RW-1:0];
  assign in_range = (int'(rpt.row) < R) && (int'(rpt.col) < R);

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      for (int r = 0; r < R; r++)
        for (int c = 0; c < R; c++) begin
          pf[r][c] <= 1'b0;
          pu[r][c] <= 1'b0;
          f[r][c]  <= 1'b0;
          g[r][c]  <= 1'b0;
        end
    end else if (pass_done) begin
      for (int r = 0; r < R; r++)
        for (int c = 0; c < R; c++) begin
          f[r][c]  <= f[r][c] | pf[r][c];
          g[r][c]  <= g[r][c] | (!pf[r][c] && !pu[r][c]);
          pf[r][c] <= 1'b0;
          pu[r][c] <= 1'b0;
        end
    end else if (rpt_fire && in_range) begin
      if (rpt.cat == RC_FAULTY)  pf[rr][rc] <= 1'b1;
      if (rpt.cat == RC_UNKNOWN) pu[rr][rc] <= 1'b1;
    end
  end

  always_comb begin
    resolved = 1'b1;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < R; c++) begin
        if (f[r][c])      status[r][c] = ST_FAULTY;
        else if (g[r][c]) status[r][c] = ST_GOOD;
        else begin
          status[r][c] = ST_UNKNOWN;
          resolved     = 1'b0;
        end
      end
  end
endmodule
