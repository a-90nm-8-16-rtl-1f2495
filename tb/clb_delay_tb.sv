// Testbench for clb_delay: the output must follow the input exactly
// DELAY_PS later, for both edges, and never earlier.
`timescale 1ps/1ps
module clb_delay_tb;
  localparam int unsigned D = 137;
  logic a, y;
  int checks = 0, failures = 0;

  clb_delay #(.DELAY_PS(D)) dut (.a, .y);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0;
    #1000;
    check(y == 0, "settled low");
    for (int i = 0; i < 20; i++) begin
      logic v;
      v = ~a;
      a = v;
      #(D - 1);
      check(y == ~v, "not yet changed one ps before the delay");
      #1;
      check(y == v, "changed exactly at the delay");
      #($urandom_range(50, 400));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
