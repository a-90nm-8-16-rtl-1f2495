// Testbench for config_chain: the outputs do not move while bits are
// shifted; after N shifts and an update the first bit sent is in q[0];
// holding shift low keeps the contents; the bits of the previous contents
// leave on dout, in order, while new ones are shifted in; reset clears all.
`timescale 1ps/1ps
module config_chain_tb;
  localparam int unsigned N = 37;
  logic clk = 0, rst_n = 0, shift = 0, din = 0, update = 0, dout;
  logic [N-1:0] q, img_a, img_b;
  int checks = 0, failures = 0;

  config_chain #(.N(N)) dut (.*);

  always #5000 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic load(input logic [N-1:0] img, output logic [N-1:0] seen);
    logic [N-1:0] prev_q;
    prev_q = q;
    for (int i = 0; i < N; i++) begin
      seen[i] = dout;
      din     = img[i];
      shift   = 1;
      @(posedge clk);
      #1;
      if (i % 5 == 0) check(q == prev_q, "outputs still while shifting");
    end
    shift  = 0;
    update = 1;
    @(posedge clk);
    #1 update = 0;
  endtask

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] seen;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(q == '0, "reset clears");
    for (int t = 0; t < 6; t++) begin
      img_a = {$urandom, $urandom};
      load(img_a, seen);
      check(q == img_a, "image loaded");
      repeat (5) @(posedge clk);
      #1 check(q == img_a, "held without shift");
      img_b = {$urandom, $urandom};
      load(img_b, seen);
      check(seen == img_a, "old image read back on dout");
      check(q == img_b, "second image loaded");
    end
    rst_n = 0;
    #1 check(q == '0, "asynchronous reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
