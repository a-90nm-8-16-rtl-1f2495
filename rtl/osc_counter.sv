// Oscillation counter: counts the rising edges of one CLB output (normally a
// ring oscillator after the CLB's divide-by-two) during a measurement window.
//
// The counter is clocked by the measured signal itself, so it keeps up with
// oscillations faster than the system clock. The window gate, generated in
// the clk domain by meas_ctrl, is brought into the pulse domain by two
// flip-flops; clr, also from clk, clears the pulse-domain state
// asynchronously before the window. The count saturates at all ones. Once
// the window has closed and the measured signal has given two more edges,
// the count no longer changes, and capture (clk domain) copies it into
// count. The first and last edges of a window can be lost to the gate
// synchroniser, so a count is exact to within two edges.
//
// That the chip counts oscillations over a fixed time follows the design;
// the clocking, synchroniser, width and saturation are this design's choice.
`timescale 1ps/1ps
module osc_counter #(
  parameter int unsigned CW = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pulse,
  input  logic          clr,
  input  logic          gate,
  input  logic          capture,
  output logic [CW-1:0] count
);
  logic          gate_s1, gate_s2;
  logic [CW-1:0] cnt;

  always_ff @(posedge pulse or posedge clr) begin
    if (clr) begin
      gate_s1 <= 1'b0;
      gate_s2 <= 1'b0;
      cnt     <= '0;
    end else begin
      gate_s1 <= gate;
      gate_s2 <= gate_s1;
      if (gate_s2 && cnt != '1) cnt <= cnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       count <= '0;
    else if (capture) count <= cnt;
  end
endmodule
