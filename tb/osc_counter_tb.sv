// Testbench for osc_counter: counts of pulse trains of several periods over
// a gated window (within two edges of window/period), clear, capture
// holding the value, and saturation of a narrow counter.
`timescale 1ps/1ps
module osc_counter_tb;
  localparam int unsigned CLK_PS = 10_000;
  logic clk = 0, rst_n = 0, pulse = 0, clr = 0, gate = 0, capture = 0;
  logic pulse_n = 0;
  logic [19:0] count;
  logic [3:0] count_n;
  int checks = 0, failures = 0;
  int half_ps = 700;

  osc_counter #(.CW(20)) dut (.clk, .rst_n, .pulse, .clr, .gate, .capture, .count);
  osc_counter #(.CW(4))  dut_n (.clk, .rst_n, .pulse(pulse_n), .clr, .gate, .capture,
                                .count(count_n));

  always #(CLK_PS / 2) clk = ~clk;
  always #(half_ps) pulse = ~pulse;
  always #3000 pulse_n = ~pulse_n;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic measure(int window_cycles);
    @(posedge clk); #1 clr = 1;
    @(posedge clk); #1 clr = 0; gate = 1;
    repeat (window_cycles) @(posedge clk);
    #1 gate = 0;
    repeat (8) @(posedge clk);
    #1 capture = 1;
    @(posedge clk); #1 capture = 0;
  endtask

  initial begin : watchdog
    #200_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_c;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(count == 0, "reset count");
    for (int t = 0; t < 6; t++) begin
      int w;
      half_ps = 300 + 450 * t;
      w = 50 + 40 * t;
      measure(w);
      exp_c = (w * CLK_PS) / (2 * half_ps);
      check(int'(count) >= exp_c - 2 && int'(count) <= exp_c + 2,
            $sformatf("count %0d, expected %0d (half period %0d ps, %0d cycles)",
                      count, exp_c, half_ps, w));
      repeat (20) @(posedge clk);
      #1 check(int'(count) >= exp_c - 2 && int'(count) <= exp_c + 2, "captured count holds");
    end
    // saturation: 6000 ps period over 200 cycles = 333 edges into 4 bits
    measure(200);
    check(count_n == 4'hF, "narrow counter saturates");
    // closed gate counts nothing
    @(posedge clk); #1 clr = 1;
    @(posedge clk); #1 clr = 0;
    repeat (50) @(posedge clk);
    #1 capture = 1;
    @(posedge clk); #1 capture = 0;
    check(count == 0, "no window, no count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
