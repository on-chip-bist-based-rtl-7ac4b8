// diag_engine: retrieval of BIST results and BIST-based diagnosis.
//
// After a BIST sequence the ORA results are retrieved by shifting them out
// of the ORA shift register, then diagnosed row by row with the MULTICELLO
// procedure (multicello_row), and every faulty, unknown or inconsistent
// resource is reported with its row and column. In the document this is a
// program run by the SoC's processor; here the same procedure is a hardware
// engine, which is this design's choice.
//
// Kinds of diagnosis (`kind`, taken at `start` together with session and
// scheme):
//   DK_LOGIC   logic BIST of an N x N PLB array (see logic_bist_array):
//              N rows of N/2-1 ORA bits. The zigzag BUT-to-ORA connections
//              are translated into straight rows before MULTICELLO and back
//              afterwards: translated row t of row pair k holds BUT j from
//              physical row 2k + (t ^ j[0]) and ORA j from the row of BUT j
//              (routing scheme 1) or of BUT j+1 (scheme 2). Reports give the
//              physical PLB row and column of the faulty/unknown BUT or of
//              the inconsistent ORA.
//   DK_RAM_DP  dual-port RAM BIST of an R x R RAM array, R = N/4: R rows of
//              (R-1)*4 ORA bits. MULTICELLO runs on each of the four data
//              bits separately; a RAM is reported faulty if any bit is
//              faulty (with those bits), otherwise unknown if any bit is
//              unknown (with those bits). Inconsistent ORAs are reported
//              with the RAM column to their left and the bits concerned.
//   DK_RAM_SP  single-port RAM BIST: R rows of R*4 bits; every failing ORA
//              directly marks its RAM bit faulty.
//
// Rotation: with `rotate` set at start (logic and dual-port RAM only) the
// results come from the arrangement turned by 90 degrees; the procedure is
// the same and the reported row and column are exchanged back to physical
// coordinates.
//
// Sequence: `start` (in IDLE) -> SHIFT: `shift` is high for exactly as many
// clocks as there are ORA bits, and the bit on `shift_in` is stored each
// clock -> SCAN: one resource per clock is examined, and a report is
// offered on rpt/rpt_valid, held until rpt_ready (valid/ready handshake)
// -> `done` pulses for one clock and the engine returns to IDLE. The
// counts of reports per category and `unique_diag` (no unknown resource)
// stay valid until the next start.
module diag_engine
  import bist_pkg::*;
#(
  parameter int unsigned N = 48
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  diag_kind_e  kind,
  input  logic        session,
  input  logic        scheme,
  input  logic        rotate,
  output logic        shift,
  input  logic        shift_in,
  output report_t     rpt,
  output logic        rpt_valid,
  input  logic        rpt_ready,
  output logic        busy,
  output logic        done,
  output logic [15:0] n_faulty,
  output logic [15:0] n_unknown,
  output logic [15:0] n_incons,
  output logic        unique_diag
);
  localparam int unsigned NBL = N / 2;       // BUTs per translated row
  localparam int unsigned NOL = NBL - 1;     // ORAs per translated row
  localparam int unsigned R   = N / 4;       // RAMs per row
  localparam int unsigned W   = (NOL > 4 * R) ? NOL : 4 * R;
  localparam int unsigned RW  = $clog2(N);   // buffer row index width
  localparam int unsigned CW  = $clog2(W);   // buffer column index width

  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_SCAN, S_DONE} state_e;

  state_e      state;
  diag_kind_e  kind_q;
  logic        east_q, scheme_q, rot_q;
  logic [W-1:0] res [N];
  logic [7:0]  row, col;       // SHIFT: buffer position; SCAN: row, element
  logic [7:0]  n_rows, row_len, n_elems;

  always_comb begin
    unique case (kind_q)
      DK_LOGIC:  begin n_rows = 8'(N); row_len = 8'(NOL);         n_elems = 8'(NBL + NOL); end
      DK_RAM_DP: begin n_rows = 8'(R); row_len = 8'(4 * (R - 1)); n_elems = 8'(2 * R - 1); end
      default:   begin n_rows = 8'(R); row_len = 8'(4 * R);     n_elems = 8'(R);         end
    endcase
  end

  // ---------------------------------------------------------------------
  // Translation of the zigzag logic BIST rows.
  function automatic logic [7:0] but_row(input logic [7:0] dr, input int unsigned j);
    return {dr[7:1], 1'b0} + 8'(dr[0] ^ j[0]);
  endfunction
  function automatic logic [7:0] ora_row(input logic [7:0] dr, input int unsigned j, input logic sch);
    return sch ? but_row(dr, j + 1) : but_row(dr, j);
  endfunction
  function automatic logic [7:0] but_col(input logic east, input int unsigned j);
    return east ? 8'(N - 2 - 2 * j) : 8'(1 + 2 * j);
  endfunction
  function automatic logic [7:0] ora_col(input logic east, input int unsigned j);
    return east ? 8'(N - 3 - 2 * j) : 8'(2 + 2 * j);
  endfunction

  logic [NOL-1:0]   l_ora;
  cell_status_e     l_st [NBL];
  logic [NOL-1:0]   l_inc;
  logic [R-2:0]     r_ora [4];
  cell_status_e     r_st  [4][R];
  logic [R-2:0]     r_inc [4];

  always_comb begin
    for (int unsigned j = 0; j < NOL; j++)
      l_ora[j] = res[RW'(ora_row(row, j, scheme_q))][j];
    for (int unsigned b = 0; b < 4; b++)
      for (int unsigned j = 0; j < R - 1; j++)
        r_ora[b][j] = res[RW'(row)][4 * j + b];
  end

  multicello_row #(.NB(NBL)) u_mc_logic (
    .ora(l_ora), .st(l_st), .incons(l_inc), .unique_diag()
  );

  for (genvar b = 0; b < 4; b++) begin : g_mc_ram
    multicello_row #(.NB(R)) u_mc_ram (
      .ora(r_ora[b]), .st(r_st[b]), .incons(r_inc[b]), .unique_diag()
    );
  end

  // ---------------------------------------------------------------------
  // Candidate report for element `col` of diagnosis row `row`.
  logic    cand_valid;
  report_t cand;

  always_comb begin
    logic [3:0] fb, ub, ib;
    cand_valid = 1'b0;
    cand       = '0;
    cand.row   = row;
    cand.col   = col;
    fb = '0; ub = '0; ib = '0;
    unique case (kind_q)
      DK_LOGIC: begin
        if (col < 8'(NBL)) begin
          cand.row  = but_row(row, int'(col));
          cand.col  = but_col(east_q, int'(col));
          cand.bits = 4'b0001;
          if (l_st[$clog2(NBL)'(col)] == ST_FAULTY)  begin cand_valid = 1'b1; cand.cat = RC_FAULTY;  end
          if (l_st[$clog2(NBL)'(col)] == ST_UNKNOWN) begin cand_valid = 1'b1; cand.cat = RC_UNKNOWN; end
        end else begin
          cand.row  = ora_row(row, int'(col) - NBL, scheme_q);
          cand.col  = ora_col(east_q, int'(col) - NBL);
          cand.bits = 4'b0001;
          if (l_inc[$clog2(NOL)'(col - 8'(NBL))]) begin cand_valid = 1'b1; cand.cat = RC_ORA_INC; end
        end
      end
      DK_RAM_DP: begin
        if (col < 8'(R)) begin
          for (int b = 0; b < 4; b++) begin
            fb[b] = (r_st[b][$clog2(R)'(col)] == ST_FAULTY);
            ub[b] = (r_st[b][$clog2(R)'(col)] == ST_UNKNOWN);
          end
          if (|fb)      begin cand_valid = 1'b1; cand.cat = RC_FAULTY;  cand.bits = fb; end
          else if (|ub) begin cand_valid = 1'b1; cand.cat = RC_UNKNOWN; cand.bits = ub; end
        end else begin
          cand.col = col - 8'(R);
          for (int b = 0; b < 4; b++) ib[b] = r_inc[b][$clog2(R - 1)'(col - 8'(R))];
          if (|ib) begin cand_valid = 1'b1; cand.cat = RC_ORA_INC; cand.bits = ib; end
        end
      end
      default: begin
        fb = res[RW'(row)][CW'(4 * col) +: 4];
        if (|fb) begin cand_valid = 1'b1; cand.cat = RC_FAULTY; cand.bits = fb; end
      end
    endcase
  end

  // ---------------------------------------------------------------------
  logic adv;   // SCAN may move to the next element
  assign adv   = (state == S_SCAN) && (!rpt_valid || rpt_ready);
  assign shift = (state == S_SHIFT);
  assign busy  = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      kind_q      <= DK_LOGIC;
      east_q      <= 1'b0;
      scheme_q    <= 1'b0;
      rot_q       <= 1'b0;
      row         <= '0;
      col         <= '0;
      rpt         <= '0;
      rpt_valid   <= 1'b0;
      done        <= 1'b0;
      n_faulty    <= '0;
      n_unknown   <= '0;
      n_incons    <= '0;
      unique_diag <= 1'b0;
    end else begin
      done <= 1'b0;
      if (rpt_valid && rpt_ready) rpt_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state       <= S_SHIFT;
          kind_q      <= kind;
          east_q      <= session;
          scheme_q    <= scheme;
          rot_q       <= rotate && (kind != DK_RAM_SP);
          row         <= '0;
          col         <= '0;
          n_faulty    <= '0;
          n_unknown   <= '0;
          n_incons    <= '0;
          unique_diag <= 1'b1;
        end
        S_SHIFT: begin
          res[RW'(row)][CW'(col)] <= shift_in;
          if (col == row_len - 1) begin
            col <= '0;
            if (row == n_rows - 1) begin
              row   <= '0;
              state <= S_SCAN;
            end else row <= row + 1'b1;
          end else col <= col + 1'b1;
        end
        S_SCAN: if (adv) begin
          if (cand_valid) begin
            rpt       <= cand;
            if (rot_q) begin
              rpt.row <= cand.col;
              rpt.col <= cand.row;
            end
            rpt_valid <= 1'b1;
            unique case (cand.cat)
              RC_FAULTY:  n_faulty  <= n_faulty + 1'b1;
              RC_UNKNOWN: begin n_unknown <= n_unknown + 1'b1; unique_diag <= 1'b0; end
              default:    n_incons  <= n_incons + 1'b1;
            endcase
          end
          if (col == n_elems - 1) begin
            col <= '0;
            if (row == n_rows - 1) state <= S_DONE;
            else row <= row + 1'b1;
          end else col <= col + 1'b1;
        end
        default: if (!rpt_valid || rpt_ready) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

  // A report stays stable until it is accepted. (rst_n also disables this
  // check, which lint tools list as a synchronous use of the reset.)
  a_rpt_hold: assert property (@(posedge clk) disable iff (!rst_n)
    rpt_valid && !rpt_ready |=> rpt_valid && $stable(rpt));
endmodule
