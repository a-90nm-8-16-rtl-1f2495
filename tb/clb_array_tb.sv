// Testbench for clb_array (3 x 4, its own seed): signals sent from a pad
// along a row (east- and westward) and through a snake over two columns
// must reach their end exactly when the sum of the per-site LUT and routing
// delays says; a constant source, a registered CLB and a two-column ring
// oscillator are checked too. Expected times come from the delay model
// alone, not from the array.
`timescale 1ps/1ps
module clb_array_tb import fpga_pkg::*;;
  localparam int unsigned ROWS = 3, COLS = 4, SEED = 5;
  localparam int unsigned LNOM = 250, RNOM = 100, SPM = 40;
  logic fab_clk = 0, fab_rst_n = 0;
  tile_cfg_t cfg [ROWS][COLS];
  logic [ROWS-1:0] pad_w_in = '0, pad_e_in = '0;
  logic [ROWS-1:0][COLS-1:0] clb_o;
  int checks = 0, failures = 0;

  clb_array #(.ROWS(ROWS), .COLS(COLS), .VAR_SEED(SEED), .LUT_NOM_PS(LNOM),
              .RT_NOM_PS(RNOM), .VAR_SPREAD_PM(SPM)) dut (.*);

  function automatic int hop(int r, int c);  // routing hop plus LUT of tile (r, c)
    return site_delay_ps(SEED, r, c, KIND_ROUTE, RNOM, SPM)
         + site_delay_ps(SEED, r, c, KIND_LUT, LNOM, SPM);
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic clear_cfg();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        cfg[r][c] = '0;
        for (int i = 0; i < LUT_K; i++) cfg[r][c].sel[i] = SRC_ZERO;
      end
  endtask

  task automatic set_buf(int r, int c, src_e from, logic inv = 0, logic ff = 0);
    cfg[r][c].sel[0]     = from;
    cfg[r][c].clb.lut    = inv ? LUT_INV0 : LUT_BUF0;
    cfg[r][c].clb.ff_out = ff;
  endtask

  // Check that (r, c) changes to v `t` ps from now: unchanged 1 ps before,
  // changed 1 ps after.
  task automatic expect_edge(int r, int c, logic v, int t, string what);
    #(t - 1);
    check(clb_o[r][c] != v, {what, ": not before its time"});
    #2;
    check(clb_o[r][c] == v, {what, ": on time"});
  endtask

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    clear_cfg();
    #5000 fab_rst_n = 1;
    // eastward along every row from the west pad
    for (int r = 0; r < ROWS; r++) begin
      clear_cfg();
      for (int c = 0; c < COLS; c++) set_buf(r, c, SRC_W);
      #20000;
      t = 0;
      for (int c = 0; c < COLS; c++) t += hop(r, c);
      for (int k = 0; k < 3; k++) begin
        pad_w_in[r] = ~pad_w_in[r];
        expect_edge(r, COLS - 1, pad_w_in[r], t, $sformatf("row %0d eastward", r));
        #3000;
      end
    end
    // westward along every row from the east pad
    for (int r = 0; r < ROWS; r++) begin
      clear_cfg();
      for (int c = 0; c < COLS; c++) set_buf(r, c, SRC_E);
      #20000;
      t = 0;
      for (int c = 0; c < COLS; c++) t += hop(r, c);
      for (int k = 0; k < 3; k++) begin
        pad_e_in[r] = ~pad_e_in[r];
        expect_edge(r, 0, pad_e_in[r], t, $sformatf("row %0d westward", r));
        #3000;
      end
    end
    // snake: down column 0 from the west pad, across, up column 1
    clear_cfg();
    set_buf(0, 0, SRC_W);
    for (int r = 1; r < ROWS; r++) set_buf(r, 0, SRC_N);
    set_buf(ROWS - 1, 1, SRC_W);
    for (int r = 0; r < ROWS - 1; r++) set_buf(r, 1, SRC_S);
    #20000;
    t = 0;
    for (int r = 0; r < ROWS; r++) t += hop(r, 0) + hop(r, 1);
    pad_w_in[0] = ~pad_w_in[0];
    expect_edge(0, 1, pad_w_in[0], t, "two-column snake");
    // constant source
    clear_cfg();
    set_buf(1, 2, SRC_ONE);
    #5000 check(clb_o[1][2] == 1, "constant one");
    // registered CLB fed from the west pad through one buffer
    set_buf(2, 0, SRC_W);
    set_buf(2, 1, SRC_W, 0, 1);
    for (int k = 0; k < 6; k++) begin
      pad_w_in[2] = k[0];
      #5000;
      if (k > 0) check(clb_o[2][1] == ~k[0], "register holds before the clock");
      fab_clk = 1; #100 fab_clk = 0; #100;
      check(clb_o[2][1] == k[0], "register loads on fab_clk");
    end
    // two-column ring oscillator: period = 2 * sum of the six hops. All
    // nodes are first brought to 0 so that the ring starts with one edge.
    clear_cfg();
    #20000;
    set_buf(0, 0, SRC_E, 1);
    for (int r = 1; r < ROWS; r++) set_buf(r, 0, SRC_N);
    set_buf(ROWS - 1, 1, SRC_W);
    for (int r = 0; r < ROWS - 1; r++) set_buf(r, 1, SRC_S);
    #50000;
    begin
      int rises = 0, expn;
      t = 0;
      for (int r = 0; r < ROWS; r++) t += hop(r, 0) + hop(r, 1);
      fork
        begin
          forever begin @(posedge clb_o[1][0]); rises++; end
        end
        #(200 * 2 * t);
      join_any
      disable fork;
      expn = 200;
      check(rises >= expn - 1 && rises <= expn + 1,
            $sformatf("ring: %0d periods, expected %0d", rises, expn));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
