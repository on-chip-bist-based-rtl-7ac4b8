// plb: programmable logic block with its configuration bytes.
//
// Two 3-input look-up tables (X LUT and Y LUT) share the inputs W, X and Y;
// a D flip-flop with set/reset takes X LUT, Y LUT or Z; the X and Y local
// outputs come from their LUT or from the flip-flop, and the L global
// output from either LUT, the flip-flop or Z. The LUT count, the flip-flop
// with set/reset and the W, X, Y, Z inputs and X, Y, L outputs follow the
// document; the exact input sharing and multiplexer choices are this
// design's simplification of the block, and its gate on W is left out.
//
// Configuration: three bytes written through cfg (FPGAZ 0: X LUT truth
// table, 1: Y LUT truth table, 2: mode byte, see bist_pkg), taken when
// `sel` is high. LUT index is {W, X, Y}. The flip-flop is clocked when `ce`
// is high; set/reset (`sr`) is synchronous and forces mode.sr_val when
// mode.sr_en is set. Outputs X and Y are combinational from the inputs or
// from the flip-flop.
module plb
  import bist_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  cfg_wr_t cfg,
  input  logic    sel,
  input  logic    ce,
  input  logic    sr,
  input  logic    w,
  input  logic    x,
  input  logic    y,
  input  logic    z,
  output logic    x_out,
  output logic    y_out,
  output logic    l_out
);
  logic [7:0] xlut, ylut;
  plb_mode_t  mode;
  logic       q, xl, yl, d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xlut <= '0;
      ylut <= '0;
      mode <= '0;
    end else if (sel) begin
      unique case (cfg.z)
        Z_XLUT:  xlut <= cfg.data;
        Z_YLUT:  ylut <= cfg.data;
        Z_MODE:  mode <= plb_mode_t'(cfg.data);
        default: ;
      endcase
    end
  end

  assign xl = xlut[{w, x, y}];
  assign yl = ylut[{w, x, y}];

  always_comb begin
    unique case (mode.ff_src)
      FF_XLUT: d = xl;
      FF_YLUT: d = yl;
      FF_Z:    d = z;
      default: d = q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                q <= 1'b0;
    else if (mode.sr_en && sr) q <= mode.sr_val;
    else if (ce)               q <= d;
  end

  assign x_out = mode.x_reg ? q : xl;
  assign y_out = mode.y_reg ? q : yl;

  always_comb begin
    unique case (mode.l_src)
      L_XLUT:  l_out = xl;
      L_YLUT:  l_out = yl;
      L_FF:    l_out = q;
      default: l_out = z;
    endcase
  end
endmodule
