// Testbench for clb: LUT function and delay, registered output, reset,
// divide-by-two of an external clock on the LUT input, and the one-CLB ring
// oscillator (LUT as inverter of its own output) divided by two.
`timescale 1ps/1ps
module clb_tb import fpga_pkg::*;;
  localparam int unsigned D = 230;
  logic fab_clk = 0, fab_rst_n = 0, ring_mode = 0;
  clb_cfg_t cfg;
  logic [LUT_K-1:0] lut_in, lut_in_drv;
  logic lut_d, q, o;
  int checks = 0, failures = 0;
  int q_rises = 0;

  assign lut_in = ring_mode ? {{(LUT_K-1){1'b0}}, lut_d} : lut_in_drv;

  clb #(.LUT_DELAY_PS(D)) dut (.*);

  always @(posedge q) q_rises++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic fab_pulse();
    fab_clk = 1;
    #100 fab_clk = 0;
    #100;
  endtask

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    lut_in_drv = '0;
    #1000 fab_rst_n = 1;
    // combinational LUT and its delay
    for (int t = 0; t < 200; t++) begin
      logic exp_v;
      cfg.lut    = 16'($urandom);
      cfg.ff_out = 0;
      cfg.div_en = 0;
      #(D + 10);
      lut_in_drv = LUT_K'($urandom);
      exp_v = cfg.lut[lut_in_drv];
      #(D - 1);
      if (lut_d != exp_v) check(1, "LUT output still old before the delay");
      #2;
      check(lut_d == exp_v, "LUT output 1 ps after the delay");
      check(o == exp_v, "output selects LUT");
    end
    // registered output
    cfg.ff_out = 1;
    for (int t = 0; t < 100; t++) begin
      logic exp_v;
      lut_in_drv = LUT_K'($urandom);
      exp_v = cfg.lut[lut_in_drv];
      #(D + 10);
      fab_pulse();
      check(q == exp_v, "flip-flop samples the LUT on fab_clk");
      check(o == q, "output selects flip-flop");
      cfg.lut = 16'($urandom);
      #(D + 10);
      check(q == exp_v, "flip-flop holds between clocks");
    end
    fab_rst_n = 0;
    #1 check(q == 0, "asynchronous reset");
    #10 fab_rst_n = 1;
    // divider: buffer LUT, external clock on input 0, q toggles per rising edge
    cfg.lut    = LUT_BUF0;
    cfg.div_en = 1;
    cfg.ff_out = 1;
    lut_in_drv = '0;
    #1000;
    fab_rst_n = 0; #10 fab_rst_n = 1;
    q_rises = 0;
    for (int t = 0; t < 64; t++) begin
      lut_in_drv[0] = 1; #1000;
      lut_in_drv[0] = 0; #1000;
      if (t == 0) check(q == 1, "first input edge sets the divider");
    end
    check(q_rises == 32, $sformatf("divide by two of 64 edges gave %0d", q_rises));
    // one-CLB ring oscillator: period 2*D, divided output period 4*D
    cfg.lut   = LUT_INV0;
    ring_mode = 1;
    #(20 * D);
    q_rises = 0;
    #(4000 * D);
    check(q_rises >= 999 && q_rises <= 1001,
          $sformatf("ring divided by two: %0d rises in 4000 LUT delays, expected 1000", q_rises));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
