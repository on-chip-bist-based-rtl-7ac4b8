// tb_plb: configures the PLB with random LUT tables and modes through its
// configuration bytes and compares X, Y and L outputs and the flip-flop
// behaviour (clock enable, synchronous set/reset) with a reference model.
// Also checks that writes are ignored when the PLB is not selected.
module tb_plb;
  import bist_pkg::*;
  logic clk = 0, rst_n = 0, sel = 0, ce = 0, sr = 0, w = 0, x = 0, y = 0, z = 0;
  cfg_wr_t cfg = '0;
  logic x_out, y_out, l_out;
  int checks = 0, failures = 0;

  plb dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_cfg(input logic [7:0] zz, input logic [7:0] d, input logic s);
    @(negedge clk);
    cfg.we = 1; cfg.z = zz; cfg.data = d; sel = s;
    @(negedge clk);
    cfg.we = 0; sel = 0;
  endtask

  initial begin
    logic [7:0] xl, yl;
    plb_mode_t  m;
    logic       q, exl, eyl, d;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 40; c++) begin
      xl = 8'($urandom); yl = 8'($urandom); m = plb_mode_t'(8'($urandom));
      write_cfg(Z_XLUT, xl, 1);
      write_cfg(Z_YLUT, yl, 1);
      write_cfg(Z_MODE, m, 1);
      // Unselected writes must not land.
      write_cfg(Z_XLUT, ~xl, 0);
      // Bring the flip-flop to a known value through set/reset or the Z path.
      @(negedge clk);
      q = dut.q;
      for (int t = 0; t < 40; t++) begin
        {w, x, y, z} = 4'($urandom);
        ce = 1'($urandom); sr = ($urandom % 5 == 0);
        #1;
        exl = xl[{w, x, y}];
        eyl = yl[{w, x, y}];
        checks++; if (x_out != (m.x_reg ? q : exl)) failures++;
        checks++; if (y_out != (m.y_reg ? q : eyl)) failures++;
        checks++;
        case (m.l_src)
          L_XLUT:  if (l_out != exl) failures++;
          L_YLUT:  if (l_out != eyl) failures++;
          L_FF:    if (l_out != q)   failures++;
          default: if (l_out != z)   failures++;
        endcase
        case (m.ff_src)
          FF_XLUT: d = exl;
          FF_YLUT: d = eyl;
          FF_Z:    d = z;
          default: d = q;
        endcase
        if (m.sr_en && sr) q = m.sr_val;
        else if (ce)       q = d;
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
