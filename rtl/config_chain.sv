// Configuration memory of the FPGA: a serial shift chain with a parallel
// shadow register in front of the fabric.
//
// Each clk cycle with shift high moves every bit of the chain one place
// towards sr[0] and takes din into sr[N-1]; dout is sr[0], so chips can be
// daisy-chained and the old contents read back while new ones go in. After
// N shifts the first bit sent sits in sr[0]: send bit 0 first. The fabric
// sees q, which changes only when update is high for a cycle and then takes
// the whole chain at once. The fabric therefore never runs a half-shifted
// configuration, and a ring oscillator can be armed in one configuration
// (inverter held constant, ring settles) and released by the next, starting
// with exactly one edge in the ring. Reset clears both registers, leaving
// every LUT at constant 0. The serial chain, shadow register and reset are
// this design's own choice; the design only requires that each chip can be
// reconfigured after it has been measured.
`timescale 1ps/1ps
module config_chain #(
  parameter int unsigned N = 3856
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         din,
  input  logic         update,
  output logic         dout,
  output logic [N-1:0] q
);
  logic [N-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0;
      q  <= '0;
    end else begin
      if (shift)  sr <= {din, sr[N-1:1]};
      if (update) q  <= sr;
    end
  end

  assign dout = sr[0];
endmodule
