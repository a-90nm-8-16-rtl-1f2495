// Testbench for meas_ctrl: for several window lengths, checks the exact
// cycle of every phase (2 clear cycles, `window` gate cycles, SETTLE cycles,
// one capture cycle, then done), that a start while busy is ignored and
// that window = 0 skips the gate.
`timescale 1ps/1ps
module meas_ctrl_tb;
  localparam int unsigned WW = 24, SETTLE = 5;
  logic clk = 0, rst_n = 0, start = 0;
  logic [WW-1:0] window = '0;
  logic clr, gate, capture, busy, done;
  int checks = 0, failures = 0;

  meas_ctrl #(.WW(WW), .SETTLE(SETTLE)) dut (.*);

  always #5000 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Start a measurement and record, cycle by cycle, what the outputs do.
  task automatic run(int w, bit poke_busy);
    int n_clr, n_gate, n_cap, n_busy, cyc, first_gate, first_cap;
    window = WW'(w);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    n_clr = 0; n_gate = 0; n_cap = 0; n_busy = 0;
    first_gate = -1; first_cap = -1;
    cyc = 1;
    while (!done && cyc < w + SETTLE + 20) begin
      if (clr)  n_clr++;
      if (gate) begin
        n_gate++;
        if (first_gate < 0) first_gate = cyc;
      end
      if (capture) begin
        n_cap++;
        first_cap = cyc;
      end
      if (busy) n_busy++;
      check(!(clr && gate) && !(gate && capture), "phases do not overlap");
      if (poke_busy && cyc == 3) start = 1;
      @(negedge clk);
      start = 0;
      cyc++;
    end
    check(done, "done reached");
    check(n_clr == 2, $sformatf("clear cycles %0d", n_clr));
    check(n_gate == w, $sformatf("gate cycles %0d, window %0d", n_gate, w));
    check(n_cap == 1, "one capture cycle");
    check(first_cap == 2 + w + SETTLE + 1, $sformatf("capture at cycle %0d", first_cap));
    check(cyc == 2 + w + SETTLE + 2, $sformatf("done after %0d cycles", cyc));
    if (w > 0) check(first_gate == 3, "gate right after clear");
    check(!busy, "idle when done");
    repeat (3) @(negedge clk);
    check(done && !busy && !gate, "done holds until the next start");
  endtask

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!busy && !done && !clr && !gate && !capture, "idle after reset");
    run(1, 0);
    run(7, 1);
    run(0, 0);
    for (int t = 0; t < 5; t++) run($urandom_range(2, 300), t[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
