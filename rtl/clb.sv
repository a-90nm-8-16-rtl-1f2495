// Configurable logic block (CLB): one LUT_K-input LUT, one flip-flop and an
// output multiplexer, plus the two small additions that make a frequency
// divider out of the flip-flop.
//
// Normal use: the flip-flop samples the (delayed) LUT output on fab_clk, and
// cfg.ff_out selects whether the CLB drives its neighbours with the LUT
// output or the flip-flop. Divider use (cfg.div_en = 1): a clock multiplexer
// clocks the flip-flop from the LUT output instead of fab_clk, and a data
// multiplexer feeds back ~q, so q toggles once per LUT-output period. With
// the LUT set as an inverter of its own output the CLB is the smallest ring
// oscillator, and its output q is that oscillation divided by two, slow
// enough to route to a counter.
//
// The CLB structure with added divider elements follows the design; the LUT
// size, the single flip-flop and the exact multiplexers are this design's
// choice. The LUT delay is a behavioural delay cell (clb_delay) whose value
// stands for this site's silicon. q resets asynchronously to 0 on fab_rst_n.
`timescale 1ps/1ps
module clb import fpga_pkg::*; #(
  parameter int unsigned LUT_DELAY_PS = 250
) (
  input  logic             fab_clk,
  input  logic             fab_rst_n,
  input  clb_cfg_t         cfg,
  input  logic [LUT_K-1:0] lut_in,
  output logic             lut_d,   // LUT output after the LUT delay
  output logic             q,       // flip-flop
  output logic             o        // CLB output to the neighbours
);
  logic lut_out, ff_clk, ff_d;

  assign lut_out = cfg.lut[lut_in];
  clb_delay #(.DELAY_PS(LUT_DELAY_PS)) u_lut_dly (.a(lut_out), .y(lut_d));

  // Divider elements: clock multiplexer and toggle feedback.
  assign ff_clk = cfg.div_en ? lut_d : fab_clk;
  assign ff_d   = cfg.div_en ? ~q    : lut_d;

  always_ff @(posedge ff_clk or negedge fab_rst_n) begin
    if (!fab_rst_n) q <= 1'b0;
    else            q <= ff_d;
  end

  assign o = cfg.ff_out ? q : lut_d;
endmodule
