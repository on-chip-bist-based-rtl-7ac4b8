// ram_bist_array: the free RAMs of the FPGA core set up for RAM BIST.
//
// There is one free RAM per 4 x 4 PLBs, so an N x N PLB array holds an
// R x R array of RAMs with R = N/4, all tested in parallel. The test
// pattern generator is the processor: it drives the same address, data,
// write enable and (in single-port modes) expected read data to every RAM
// through the ports below. Three BIST configurations are selected by
// `mode` (document):
//   RAM_SP_SYNC / RAM_SP_ASYNC  single-port: four ORAs per RAM, one per data
//       bit, compare the RAM's read data with the expected data `exp`;
//   RAM_DP_SYNC  dual-port: ORAs between neighbouring RAM columns compare
//       the read data of RAM (r,j) with RAM (r,j+1), four ORAs per pair.
// Faults in a RAM therefore show up as ORA failures for its bits (single
// port) or in the ORAs on both sides of it (dual port), which is what the
// MULTICELLO diagnosis works on.
//
// `cmp` tells the ORAs that the read data of this cycle is to be compared;
// the processor raises it in the cycle the data is valid (one clock after
// the read address in the synchronous modes, the same cycle in the
// asynchronous mode). `shift` turns the ORAs of the current mode into one
// shift register whose bit 0 is on `shift_out`:
//   single-port: bit ((r*R + c)*4 + b) is RAM (r,c) bit b;
//   dual-port:   bit ((r*(R-1) + j)*4 + b) is the ORA between RAM (r,j) and
//                RAM (r,j+1) for bit b.
// With `rotate` high the dual-port arrangement is turned by 90 degrees:
// ORA (r,j) compares RAM (j,r) with RAM (j+1,r), i.e. rows of ORAs compare
// rows of RAMs, and the chain index r is a RAM column. Diagnosing both
// orientations removes most ambiguities at the array edges (document).
// The single-port and dual-port ORA sets are modelled as separate ora
// instances; in the device they are the same PLBs reconfigured. `flt`
// injects emulated cell faults into each RAM.
module ram_bist_array
  import bist_pkg::*;
#(
  parameter int unsigned N = 48
) (
  input  logic        clk,
  input  logic        rst_n,
  input  ram_mode_e   mode,
  input  logic        rotate,
  input  logic        we,
  input  logic [4:0]  waddr,
  input  logic [3:0]  wdata,
  input  logic [4:0]  raddr,
  input  logic [3:0]  exp_data,
  input  logic        cmp,
  input  ram_fault_t  flt [N/4][N/4],
  input  logic        ora_clr,
  input  logic        shift,
  output logic        shift_out
);
  localparam int unsigned R   = N / 4;
  localparam int unsigned NSP = R * R * 4;
  localparam int unsigned NDP = R * (R - 1) * 4;

  logic [3:0] rd [R][R];
  logic [3:0] rv [R][R];   // read data as the dual-port ORAs see it
  logic       sp_q [NSP];
  logic       dp_q [NDP];
  logic       sp_mode;

  assign sp_mode = (mode != RAM_DP_SYNC);

  for (genvar r = 0; r < R; r++) begin : g_row
    for (genvar c = 0; c < R; c++) begin : g_col
      free_ram u_ram (
        .clk, .mode, .we, .waddr, .wdata, .raddr,
        .flt  (flt[r][c]),
        .rdata(rd[r][c])
      );
    end
  end

  for (genvar p = 0; p < NSP; p++) begin : g_sp
    ora u_ora (
      .clk, .rst_n,
      .clr     (ora_clr),
      .cmp     (cmp && sp_mode),
      .a       (rd[p/(4*R)][(p/4)%R][p%4]),
      .b       (exp_data[p%4]),
      .shift   (shift && sp_mode),
      .shift_in((p == NSP - 1) ? 1'b0 : sp_q[(p + 1) % NSP]),
      .fail    (sp_q[p])
    );
  end

  always_comb
    for (int r = 0; r < R; r++)
      for (int c = 0; c < R; c++)
        rv[r][c] = rotate ? rd[c][r] : rd[r][c];

  for (genvar p = 0; p < NDP; p++) begin : g_dp
    ora u_ora (
      .clk, .rst_n,
      .clr     (ora_clr),
      .cmp     (cmp && !sp_mode),
      .a       (rv[p/(4*(R-1))][(p/4)%(R-1)][p%4]),
      .b       (rv[p/(4*(R-1))][(p/4)%(R-1)+1][p%4]),
      .shift   (shift && !sp_mode),
      .shift_in((p == NDP - 1) ? 1'b0 : dp_q[(p + 1) % NDP]),
      .fail    (dp_q[p])
    );
  end

  assign shift_out = sp_mode ? sp_q[0] : dp_q[0];
endmodule
