// tb_logic_bist_array: runs logic BIST on an 8 x 8 PLB array.
//
// The testbench plays the processor: it writes the BUT configurations,
// runs the TPGs for 32 clocks per configuration and shifts the ORA results
// out. Checks:
//  - a fault-free array passes all four configurations in both sessions
//    and both routing schemes (no ORA fails);
//  - a single PLB with a corrupted X LUT (or Y LUT) entry makes exactly the
//    ORA that observes that output fail: X outputs are seen by the ORA in
//    the other row of the pair (diagonal neighbour), Y outputs by the ORA
//    in the same row (direct neighbour), on the side given by the scheme;
//  - the same holds with the arrangement rotated by 90 degrees (rows and
//    columns exchanged);
//  - a PLB outside the session's BUT columns is not observed.
module tb_logic_bist_array;
  import bist_pkg::*;
  localparam int N  = 8;
  localparam int NB = N / 2;
  localparam int NO = NB - 1;
  localparam int NORA = N * NO;

  logic clk = 0, rst_n = 0;
  cfg_wr_t cfg = '0;
  logic [N-1:0] row_sel = '0, col_sel = '0;
  logic session = 0, scheme = 0, rotate = 0, tpg_clr = 0, run = 0, ora_clr = 0, shift = 0;
  logic shift_out, tpg_wrap;
  int checks = 0, failures = 0;

  logic_bist_array #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int r, input int c, input logic [7:0] z, input logic [7:0] d);
    @(negedge clk);
    cfg = '{we: 1'b1, x: 8'(c), y: 8'(r), z: z, data: d};
    row_sel = N'(1) << r; col_sel = N'(1) << c;
    @(negedge clk);
    cfg.we = 0; row_sel = '0; col_sel = '0;
  endtask

  // BIST configuration k (0..3) of the BUTs.
  function automatic logic [23:0] bist_cfg(input int k);
    plb_mode_t m;
    logic [7:0] lut;
    m = '0;
    lut = (k == 1) ? 8'hE8 : 8'h96;
    if (k >= 2) begin m.x_reg = 1; m.y_reg = 1; end
    if (k == 3) begin m.ff_src = FF_Z; m.sr_en = 1; m.sr_val = 1; end
    return {m, lut, lut};
  endfunction

  task automatic config_all(input int k);
    logic [23:0] c;
    c = bist_cfg(k);
    for (int r = 0; r < N; r++)
      for (int cc = 0; cc < N; cc++) begin
        wr(r, cc, Z_XLUT, c[7:0]);
        wr(r, cc, Z_YLUT, c[15:8]);
        wr(r, cc, Z_MODE, c[23:16]);
      end
  endtask

  task automatic run_tpg();
    int wraps;
    @(negedge clk); tpg_clr = 1; @(negedge clk); tpg_clr = 0;
    run = 1; wraps = 0;
    repeat (32) begin @(posedge clk); if (tpg_wrap) wraps++; @(negedge clk); end
    run = 0;
    checks++; if (wraps != 1) failures++;
  endtask

  task automatic read_oras(output logic [NORA-1:0] v);
    @(negedge clk);
    shift = 1;
    for (int p = 0; p < NORA; p++) begin
      v[p] = shift_out;
      @(negedge clk);
    end
    shift = 0;
  endtask

  task automatic clear_oras();
    @(negedge clk); ora_clr = 1; @(negedge clk); ora_clr = 0;
  endtask

  function automatic int but_col(input logic east, input int j);
    return east ? (N - 2 - 2 * j) : (1 + 2 * j);
  endfunction

  initial begin
    logic [NORA-1:0] v, e;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // Fault-free: all four configurations per session and scheme.
    for (int s = 0; s < 2; s++)
      for (int sc = 0; sc < 2; sc++) begin
        session = s[0]; scheme = sc[0];
        clear_oras();
        for (int k = 0; k < 4; k++) begin config_all(k); run_tpg(); end
        read_oras(v);
        checks++;
        if (v != '0) begin failures++; $display("fault-free s%0d sc%0d: %b", s, sc, v); end
      end

    // Single corrupted LUT entry, combinational configuration.
    config_all(0);
    for (int t = 0; t < 24; t++) begin
      int r, j, c, out_y;
      r = $urandom % N; j = $urandom % NB; out_y = $urandom % 2;
      session = 1'($urandom); scheme = 1'($urandom);
      c = but_col(session, j);
      wr(r, c, out_y ? Z_YLUT : Z_XLUT, 8'h96 ^ 8'h01);
      clear_oras();
      run_tpg();
      read_oras(v);
      e = '0;
      if (out_y) begin
        // Y goes to the ORA in the same row: right of the BUT in scheme 1,
        // left in scheme 2.
        if (!scheme && j < NO) e[r * NO + j] = 1;
        if (scheme && j > 0)   e[r * NO + j - 1] = 1;
      end else begin
        // X goes to the ORA in the other row of the pair: left in scheme 1,
        // right in scheme 2.
        if (!scheme && j > 0)  e[(r ^ 1) * NO + j - 1] = 1;
        if (scheme && j < NO)  e[(r ^ 1) * NO + j] = 1;
      end
      checks++;
      if (v != e) begin
        failures++;
        $display("fault r%0d j%0d y%0d s%0d sc%0d: got %b exp %b", r, j, out_y, session, scheme, v, e);
      end
      wr(r, c, out_y ? Z_YLUT : Z_XLUT, 8'h96);
    end

    // Rotated by 90 degrees: "row" r is PLB column r and BUT j sits in PLB
    // row but_col(j); the same observation rules hold in that frame.
    rotate = 1;
    for (int t = 0; t < 12; t++) begin
      int r, j, c, out_y;
      r = $urandom % N; j = $urandom % NB; out_y = $urandom % 2;
      session = 1'($urandom); scheme = 1'($urandom);
      c = but_col(session, j);
      wr(c, r, out_y ? Z_YLUT : Z_XLUT, 8'h96 ^ 8'h01);
      clear_oras();
      run_tpg();
      read_oras(v);
      e = '0;
      if (out_y) begin
        if (!scheme && j < NO) e[r * NO + j] = 1;
        if (scheme && j > 0)   e[r * NO + j - 1] = 1;
      end else begin
        if (!scheme && j > 0)  e[(r ^ 1) * NO + j - 1] = 1;
        if (scheme && j < NO)  e[(r ^ 1) * NO + j] = 1;
      end
      checks++;
      if (v != e) begin
        failures++;
        $display("rotated fault r%0d j%0d y%0d s%0d sc%0d: got %b exp %b", r, j, out_y, session, scheme, v, e);
      end
      wr(c, r, out_y ? Z_YLUT : Z_XLUT, 8'h96);
    end
    rotate = 0;

    // A corrupted PLB in an ORA column of the session is not observed.
    session = 0; scheme = 0;
    wr(3, 2, Z_XLUT, 8'h00);
    wr(3, 2, Z_YLUT, 8'h00);
    clear_oras(); run_tpg(); read_oras(v);
    checks++; if (v != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
