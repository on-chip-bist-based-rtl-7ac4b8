// free_ram: one 32 x 4-bit "free RAM" of the FPGA core.
//
// The RAM can work as synchronous or asynchronous, single-port or dual-port
// memory (document). Dual-port mode has a write port (waddr, wdata, we) and a
// separate read port (raddr); single-port mode uses waddr as the one address
// for reads and writes. The device's bidirectional single-port data bus is
// modelled as separate wdata and rdata, which is this design's choice.
//
// Timing (own choice where the document is silent): writes happen on the
// clock edge when `we` is high in every mode. In the synchronous modes the
// read data is registered: rdata shows the word addressed in the previous
// cycle (read-before-write when the same word is written). In the
// asynchronous mode rdata follows the address combinationally.
//
// `flt` is a fault-injection hook used to emulate a defective cell: the
// masked bits of one word read back stuck at a value. With flt.en low the
// RAM is fault free.
module free_ram
  import bist_pkg::*;
(
  input  logic       clk,
  input  ram_mode_e  mode,
  input  logic       we,
  input  logic [4:0] waddr,
  input  logic [3:0] wdata,
  input  logic [4:0] raddr,
  input  ram_fault_t flt,
  output logic [3:0] rdata
);
  logic [3:0] mem [32];
  logic [4:0] ra;
  logic [3:0] rd_q, rd_raw;
  logic [4:0] rd_addr_q;

  assign ra = (mode == RAM_DP_SYNC) ? raddr : waddr;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rd_q      <= mem[ra];
    rd_addr_q <= ra;
  end

  // Fault emulation applies to the word actually read.
  always_comb begin
    logic [4:0] a;
    if (mode == RAM_SP_ASYNC) begin
      rd_raw = mem[ra];
      a      = ra;
    end else begin
      rd_raw = rd_q;
      a      = rd_addr_q;
    end
    rdata = rd_raw;
    if (flt.en && (a == flt.addr))
      rdata = (rd_raw & ~flt.mask) | (flt.val & flt.mask);
  end
endmodule
