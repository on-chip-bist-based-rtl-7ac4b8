// bist_pkg: types and constants shared by the embedded-FPGA BIST and
// diagnosis blocks.
//
// - The configuration write record (cfg_wr_t) carries one byte write from the
//   processor into the FPGA configuration memory: a 24-bit address split into
//   FPGAX (column), FPGAY (row) and FPGAZ (byte inside the PLB) plus 8 data
//   bits. That split is the device's; the Z-byte layout below is this
//   design's own.
// - The PLB mode byte (plb_mode_t) selects what drives the flip-flop and the
//   X, Y and L outputs; its bit layout is this design's own.
// - Diagnosis status and report records follow the three result categories
//   of the diagnosis: faulty, unknown and ORA inconsistency.
package bist_pkg;

  // FPGAZ byte addresses inside one PLB (own choice).
  localparam logic [7:0] Z_XLUT = 8'd0;   // X LUT truth table
  localparam logic [7:0] Z_YLUT = 8'd1;   // Y LUT truth table
  localparam logic [7:0] Z_MODE = 8'd2;   // plb_mode_t

  typedef struct packed {
    logic       we;
    logic [7:0] x;      // FPGAX: PLB column
    logic [7:0] y;      // FPGAY: PLB row
    logic [7:0] z;      // FPGAZ: resource inside the PLB
    logic [7:0] data;
  } cfg_wr_t;

  // Flip-flop data source.
  typedef enum logic [1:0] {
    FF_XLUT = 2'd0,
    FF_YLUT = 2'd1,
    FF_Z    = 2'd2,
    FF_HOLD = 2'd3
  } ff_src_e;

  // L (global) output source.
  typedef enum logic [1:0] {
    L_XLUT = 2'd0,
    L_YLUT = 2'd1,
    L_FF   = 2'd2,
    L_Z    = 2'd3
  } l_src_e;

  typedef struct packed {
    logic    sr_val;  // value forced by set/reset
    logic    sr_en;   // set/reset input honoured
    l_src_e  l_src;
    logic    y_reg;   // Y output from the flip-flop instead of the Y LUT
    logic    x_reg;   // X output from the flip-flop instead of the X LUT
    ff_src_e ff_src;
  } plb_mode_t;

  // RAM BIST configurations (three are needed to test the free RAMs).
  typedef enum logic [1:0] {
    RAM_DP_SYNC  = 2'd0,  // synchronous dual-port, neighbouring RAMs compared
    RAM_SP_SYNC  = 2'd1,  // synchronous single-port, compared with expected data
    RAM_SP_ASYNC = 2'd2   // asynchronous single-port, compared with expected data
  } ram_mode_e;

  // Fault injection record for one free RAM (emulation hook): when `en` is
  // set, the bits in `mask` of the word at `addr` read back as `val`.
  typedef struct packed {
    logic       en;
    logic [4:0] addr;
    logic [3:0] mask;
    logic [3:0] val;
  } ram_fault_t;

  // What the diagnosis engine is asked to diagnose.
  typedef enum logic [1:0] {
    DK_LOGIC  = 2'd0,
    DK_RAM_DP = 2'd1,
    DK_RAM_SP = 2'd2
  } diag_kind_e;

  // Status of one cell (BUT or RAM) during MULTICELLO.
  typedef enum logic [1:0] {
    ST_UNKNOWN = 2'd0,
    ST_GOOD    = 2'd1,
    ST_FAULTY  = 2'd2
  } cell_status_e;

  // Report categories.
  typedef enum logic [1:0] {
    RC_FAULTY  = 2'd1,
    RC_UNKNOWN = 2'd2,
    RC_ORA_INC = 2'd3
  } rpt_cat_e;

  typedef struct packed {
    rpt_cat_e   cat;
    logic [7:0] row;
    logic [7:0] col;
    logic [3:0] bits;   // RAM reports: bits concerned; logic reports: 4'b0001
  } report_t;

endpackage
