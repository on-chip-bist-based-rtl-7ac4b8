// efpga_bist_top: embedded FPGA core with on-chip BIST and diagnosis.
//
// The embedded FPGA core of a processor-based system-on-chip tests itself:
// the processor rewrites the FPGA configuration so that PLBs become test
// pattern generators (TPGs), blocks under test (BUTs) and output response
// analyzers (ORAs), runs the test, shifts the ORA results out and diagnoses
// which PLBs, RAMs or ORAs are faulty. This top holds the FPGA side:
//   cfg_decoder       processor write port into the configuration memory
//                     (FPGAX/FPGAY/FPGAZ address bytes, 8-bit data);
//   logic_bist_array  N x N PLBs with TPGs and ORAs for the west and east
//                     sessions and the two routing schemes;
//   ram_bist_array    (N/4) x (N/4) free RAMs with single-port and
//                     dual-port ORAs; the processor is their TPG;
//   diag_engine       ORA result retrieval and MULTICELLO diagnosis;
//   diag_merge        RAM status merged over several diagnosis passes.
// The processor itself is outside: its configuration writes, BIST controls,
// RAM test patterns and the diagnosis reports are the ports of this top.
// N = 48 is the largest device's PLB array (48 x 48 PLBs, 12 x 12 RAMs).
//
// Use: configure BUTs with cfg_* writes; pulse tpg_clr and hold logic_run
// for the pattern sequence (32 clocks per configuration); repeat for the
// four configurations of a session; then pulse diag_start with diag_kind =
// DK_LOGIC and the same session/scheme. The diagnosis engine shifts the
// selected ORA chain (logic or RAM, chosen by diag_kind at diag_start)
// and streams reports on rpt/rpt_valid/rpt_ready; diag_done pulses at the
// end. ora_clr clears both ORA sets before a new test session. RAM BIST is
// driven through ram_* in the same way. `rotate` turns the logic and
// dual-port RAM arrangements by 90 degrees (and must be set for the
// matching diagnosis) to resolve cells left unknown; ram_status merges the
// RAM diagnoses since ram_map_clr (diag_merge), so a RAM left unknown by
// one pass is resolved by another. ram_flt is the per-RAM fault
// emulation hook (all zero in normal use).
module efpga_bist_top
  import bist_pkg::*;
#(
  parameter int unsigned N = 48
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration memory write port
  input  logic        cfg_we,
  input  logic [23:0] cfg_addr,
  input  logic [7:0]  cfg_data,
  // logic BIST control
  input  logic        session,
  input  logic        scheme,
  input  logic        rotate,
  input  logic        tpg_clr,
  input  logic        logic_run,
  input  logic        ora_clr,
  output logic        tpg_wrap,
  // RAM BIST: the processor's test patterns
  input  ram_mode_e   ram_mode,
  input  logic        ram_we,
  input  logic [4:0]  ram_waddr,
  input  logic [3:0]  ram_wdata,
  input  logic [4:0]  ram_raddr,
  input  logic [3:0]  ram_exp,
  input  logic        ram_cmp,
  input  ram_fault_t  ram_flt [N/4][N/4],
  // diagnosis
  input  logic        diag_start,
  input  diag_kind_e  diag_kind,
  output report_t     rpt,
  output logic        rpt_valid,
  input  logic        rpt_ready,
  output logic        diag_busy,
  output logic        diag_done,
  input  logic        ram_map_clr,
  output cell_status_e ram_status [N/4][N/4],
  output logic        ram_resolved,
  output logic [15:0] n_faulty,
  output logic [15:0] n_unknown,
  output logic [15:0] n_incons,
  output logic        diag_unique
);
  cfg_wr_t      cfg;
  logic [N-1:0] row_sel, col_sel;
  logic         shift, l_shift_out, r_shift_out, src_ram;

  cfg_decoder #(.N(N)) u_cfg (
    .clk, .rst_n,
    .wr_en  (cfg_we),
    .wr_addr(cfg_addr),
    .wr_data(cfg_data),
    .cfg, .row_sel, .col_sel
  );

  // Which ORA chain the diagnosis engine is reading.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       src_ram <= 1'b0;
    else if (diag_start && !diag_busy) src_ram <= (diag_kind != DK_LOGIC);
  end

  logic_bist_array #(.N(N)) u_logic (
    .clk, .rst_n, .cfg, .row_sel, .col_sel,
    .session, .scheme, .rotate, .tpg_clr,
    .run      (logic_run),
    .ora_clr,
    .shift    (shift && !src_ram),
    .shift_out(l_shift_out),
    .tpg_wrap
  );

  ram_bist_array #(.N(N)) u_ram (
    .clk, .rst_n,
    .mode     (ram_mode),
    .rotate,
    .we       (ram_we),
    .waddr    (ram_waddr),
    .wdata    (ram_wdata),
    .raddr    (ram_raddr),
    .exp_data (ram_exp),
    .cmp      (ram_cmp),
    .flt      (ram_flt),
    .ora_clr,
    .shift    (shift && src_ram),
    .shift_out(r_shift_out)
  );

  diag_engine #(.N(N)) u_diag (
    .clk, .rst_n,
    .start      (diag_start),
    .kind       (diag_kind),
    .session, .scheme, .rotate,
    .shift,
    .shift_in   (src_ram ? r_shift_out : l_shift_out),
    .rpt, .rpt_valid, .rpt_ready,
    .busy       (diag_busy),
    .done       (diag_done),
    .n_faulty, .n_unknown, .n_incons,
    .unique_diag(diag_unique)
  );

  // Merged RAM status over the RAM diagnosis passes since ram_map_clr. The
  // pass is folded in one clock after diag_done, when its last report has
  // been taken.
  logic done_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done_q <= 1'b0;
    else        done_q <= diag_done;
  end

  diag_merge #(.R(N/4)) u_merge (
    .clk, .rst_n,
    .clr       (ram_map_clr),
    .rpt,
    .rpt_fire  (rpt_valid && rpt_ready && src_ram),
    .pass_done (done_q && src_ram),
    .status    (ram_status),
    .resolved  (ram_resolved)
  );
endmodule
