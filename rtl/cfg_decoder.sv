// cfg_decoder: processor write port into the FPGA configuration memory.
//
// The processor can write, but not read, the configuration memory through a
// 24-bit address bus made of three bytes, FPGAX (PLB column), FPGAY (PLB
// row) and FPGAZ (resource inside the PLB), and an 8-bit data bus; that
// split follows the document. This block registers one write per clock and
// decodes FPGAX and FPGAY into one-hot column and row selects, so that the
// PLB at (row, col) takes the write when row_sel[row] & col_sel[col].
// Addresses outside the N x N array select nothing. Timing: the decoded
// write is visible one clock after the processor presents it.
module cfg_decoder
  import bist_pkg::*;
#(
  parameter int unsigned N = 48
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [23:0]   wr_addr,   // {FPGAZ, FPGAY, FPGAX}
  input  logic [7:0]    wr_data,
  output cfg_wr_t       cfg,
  output logic [N-1:0]  row_sel,
  output logic [N-1:0]  col_sel
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg <= '0;
    end else begin
      cfg.we   <= wr_en;
      cfg.x    <= wr_addr[7:0];
      cfg.y    <= wr_addr[15:8];
      cfg.z    <= wr_addr[23:16];
      cfg.data <= wr_data;
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      row_sel[i] = cfg.we && (cfg.y == 8'(i));
      col_sel[i] = cfg.we && (cfg.x == 8'(i));
    end
  end
endmodule
