// logic_bist_array: the N x N PLB array set up for logic BIST.
//
// Every PLB site holds a plb. In a test session some PLB columns are blocks
// under test (BUTs) and the columns between them are comparison ORAs; the
// column arrangement follows the document's column-based architecture:
//   west session (session = 0): BUT j at column 1+2j, ORA j at column 2+2j,
//                               TPGs on the west edge;
//   east session (session = 1): the same arrangement flipped about the
//                               vertical axis: BUT j at column N-2-2j,
//                               ORA j at column N-3-2j.
// So NB = N/2 BUTs and NB-1 ORAs per row, and the two sessions together
// test every PLB. ORA j sits between BUT j and BUT j+1.
//
// Local routing lets an ORA see one Y output from a direct (same-row)
// neighbour and one X output from a diagonal neighbour, so rows are paired
// (r and r^1) and every ORA compares a Y against an X in the other row of
// its pair, giving a zigzag. Two routing schemes alternate which neighbour
// provides which output so that both outputs of every BUT are observed:
//   scheme 1 (scheme = 0): ORA(r,j) compares Y of BUT(r,j)   with X of BUT(r^1,j+1)
//   scheme 2 (scheme = 1): ORA(r,j) compares Y of BUT(r,j+1) with X of BUT(r^1,j)
// The one-Y/one-X rule, the zigzag across row pairs and the two schemes are
// the document's; which exact neighbour feeds each ORA is this design's
// reading of its figures. BUTs must be configured so that their X and Y
// outputs carry the same function.
//
// TPGs: two 5-bit up-counters, TPG 0 driving the even rows and TPG 1 the
// odd rows (the figure shows TPGs in pairs; the row split is own choice),
// so a faulty TPG shows up as mismatches in every ORA. Pattern bits drive
// BUT inputs X, Y, W, Z and set/reset (bits 0..4). The TPG PLB sites and the
// ORA PLB sites are modelled by dedicated tpg_counter and ora instances;
// the plb instances at those sites are idle during the session.
//
// Rotation (rotate = 1): the whole arrangement turned by 90 degrees, so
// that rows of ORAs compare rows of BUTs; everything above holds with rows
// and columns exchanged (BUT j of "row" r is the PLB at row but_col(j),
// column r). Diagnosing both orientations resolves most cells that one
// orientation leaves unknown (document); the transposition is this
// design's way of building it.
//
// Control: `run` advances the TPGs, clocks the BUT flip-flops and lets the
// ORAs compare; `ora_clr` clears all ORAs; `shift` turns the ORAs into one
// shift register, ORA (row r, index j) being bit r*(NB-1)+j of the stream
// that leaves on `shift_out`, bit 0 first (one bit per clock; bit 0 is on
// shift_out before the first shift clock). Configuration writes come from
// cfg_decoder. The ORA latches persist across reconfigurations, so results
// of the four configurations of a session accumulate until retrieval.
module logic_bist_array
  import bist_pkg::*;
#(
  parameter int unsigned N = 48
) (
  input  logic          clk,
  input  logic          rst_n,
  input  cfg_wr_t       cfg,
  input  logic [N-1:0]  row_sel,
  input  logic [N-1:0]  col_sel,
  input  logic          session,
  input  logic          scheme,
  input  logic          rotate,
  input  logic          tpg_clr,
  input  logic          run,
  input  logic          ora_clr,
  input  logic          shift,
  output logic          shift_out,
  output logic          tpg_wrap
);
  localparam int unsigned NB = N / 2;
  localparam int unsigned NO = NB - 1;
  localparam int unsigned NORA = N * NO;

  logic [4:0] pat [2];
  logic [1:0] wrap;
  logic       x_o [N][N];
  logic       y_o [N][N];
  logic       ora_a [NORA];
  logic       ora_b [NORA];
  logic       ora_q [NORA];

  for (genvar t = 0; t < 2; t++) begin : g_tpg
    tpg_counter #(.WIDTH(5)) u_tpg (
      .clk, .rst_n, .clr(tpg_clr), .run,
      .pattern(pat[t]), .wrap(wrap[t])
    );
  end
  assign tpg_wrap = |wrap;

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      logic l_unused;
      plb u_plb (
        .clk, .rst_n, .cfg,
        .sel  (row_sel[r] && col_sel[c]),
        .ce   (run),
        .sr   (pat[r%2][4]),
        .w    (pat[r%2][2]),
        .x    (pat[r%2][0]),
        .y    (pat[r%2][1]),
        .z    (pat[r%2][3]),
        .x_out(x_o[r][c]),
        .y_out(y_o[r][c]),
        .l_out(l_unused)
      );
    end
  end

  // Physical column of BUT j in the current session.
  function automatic int unsigned but_col(input logic east, input int unsigned j);
    return east ? (N - 2 - 2 * j) : (1 + 2 * j);
  endfunction

  // BUT outputs seen through the rotation: in the rotated architecture
  // "row" r and "column" c of the description above are PLB column r and
  // PLB row c.
  logic xv [N][N];
  logic yv [N][N];
  always_comb begin
    for (int unsigned r = 0; r < N; r++)
      for (int unsigned c = 0; c < N; c++) begin
        xv[r][c] = rotate ? x_o[c][r] : x_o[r][c];
        yv[r][c] = rotate ? y_o[c][r] : y_o[r][c];
      end
  end

  // ORA input selection for session and routing scheme.
  always_comb begin
    for (int unsigned r = 0; r < N; r++) begin
      for (int unsigned j = 0; j < NO; j++) begin
        if (!scheme) begin
          ora_a[r*NO+j] = yv[r][but_col(session, j)];
          ora_b[r*NO+j] = xv[r^1][but_col(session, j + 1)];
        end else begin
          ora_a[r*NO+j] = yv[r][but_col(session, j + 1)];
          ora_b[r*NO+j] = xv[r^1][but_col(session, j)];
        end
      end
    end
  end

  for (genvar p = 0; p < NORA; p++) begin : g_ora
    ora u_ora (
      .clk, .rst_n,
      .clr     (ora_clr),
      .cmp     (run),
      .a       (ora_a[p]),
      .b       (ora_b[p]),
      .shift,
      .shift_in((p == NORA - 1) ? 1'b0 : ora_q[(p + 1) % NORA]),
      .fail    (ora_q[p])
    );
  end

  assign shift_out = ora_q[0];
endmodule
