// Testbench for swm: for every source code and random neighbour values, the
// LUT inputs must carry the selected source; routed sources arrive exactly
// one routing hop (RT_DELAY_PS) after a change, local ones at once.
`timescale 1ps/1ps
module swm_tb import fpga_pkg::*;;
  localparam int unsigned RT = 90;
  src_e [LUT_K-1:0] sel;
  logic self_lut, self_q, n_in, e_in, s_in, w_in;
  logic [LUT_K-1:0] lut_in;
  int checks = 0, failures = 0;

  swm #(.RT_DELAY_PS(RT)) dut (.*);

  function automatic logic pick(src_e s);
    case (s)
      SRC_LUT:  return self_lut;
      SRC_N:    return n_in;
      SRC_E:    return e_in;
      SRC_S:    return s_in;
      SRC_W:    return w_in;
      SRC_Q:    return self_q;
      SRC_ZERO: return 1'b0;
      default:  return 1'b1;
    endcase
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {self_lut, self_q, n_in, e_in, s_in, w_in} = '0;
    for (int i = 0; i < LUT_K; i++) sel[i] = src_e'(i);
    #1000;
    // static selection: every source on every input
    for (int t = 0; t < 400; t++) begin
      for (int i = 0; i < LUT_K; i++) sel[i] = src_e'($urandom_range(0, 7));
      {self_lut, self_q, n_in, e_in, s_in, w_in} = 6'($urandom);
      #(RT + 10);
      for (int i = 0; i < LUT_K; i++)
        check(lut_in[i] == pick(sel[i]), $sformatf("input %0d source %s", i, sel[i].name()));
    end
    // timing: routed sources need one hop, local ones none
    for (int t = 0; t < 40; t++) begin
      for (int i = 0; i < LUT_K; i++) sel[i] = src_e'($urandom_range(0, 5));
      #(RT + 10);
      {self_lut, self_q, n_in, e_in, s_in, w_in} = ~{self_lut, self_q, n_in, e_in, s_in, w_in};
      #1;
      for (int i = 0; i < LUT_K; i++) begin
        if (sel[i] == SRC_LUT || sel[i] == SRC_Q)
          check(lut_in[i] == pick(sel[i]), "local source passes without a hop");
        else
          check(lut_in[i] != pick(sel[i]), "routed source not yet through the hop");
      end
      #(RT - 2);
      for (int i = 0; i < LUT_K; i++)
        if (!(sel[i] == SRC_LUT || sel[i] == SRC_Q))
          check(lut_in[i] != pick(sel[i]), "routed source not through 1 ps before the hop");
      #2;
      for (int i = 0; i < LUT_K; i++)
        check(lut_in[i] == pick(sel[i]), "routed source through 1 ps after the hop");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
