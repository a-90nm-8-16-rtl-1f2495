// Switch matrix (SWM) of one tile: the programmable routing in front of a CLB.
//
// Each of the LUT_K LUT inputs has its own 8:1 multiplexer, set by one
// configuration field (fpga_pkg::src_e). The routed sources are the outputs
// of the four neighbouring CLBs (or, on the west and east edges, the pads)
// and the constants; a routed selection passes through one routing-hop delay
// cell, whose value varies from tile to tile like the silicon it models. The
// two local sources, the CLB's own LUT output and its own flip-flop, bypass
// the hop: that is the short feedback loop of the one-CLB ring oscillator.
//
// The design gives an array of CLBs with SWMs whose paths run "through CLBs
// and SWMs"; the nearest-neighbour topology and the local bypass are this
// design's own choice. Purely combinational; no clock.
`timescale 1ps/1ps
module swm import fpga_pkg::*; #(
  parameter int unsigned RT_DELAY_PS = 100
) (
  input  src_e [LUT_K-1:0] sel,
  input  logic             self_lut,  // own delayed LUT output
  input  logic             self_q,    // own flip-flop
  input  logic             n_in,
  input  logic             e_in,
  input  logic             s_in,
  input  logic             w_in,
  output logic [LUT_K-1:0] lut_in
);
  for (genvar i = 0; i < LUT_K; i++) begin : g_in
    logic routed, routed_d, local_sig, is_local;

    always_comb begin
      unique case (sel[i])
        SRC_N:    routed = n_in;
        SRC_E:    routed = e_in;
        SRC_S:    routed = s_in;
        SRC_W:    routed = w_in;
        SRC_ONE:  routed = 1'b1;
        default:  routed = 1'b0;
      endcase
    end

    clb_delay #(.DELAY_PS(RT_DELAY_PS)) u_hop (.a(routed), .y(routed_d));

    assign is_local  = (sel[i] == SRC_LUT) || (sel[i] == SRC_Q);
    assign local_sig = (sel[i] == SRC_LUT) ? self_lut : self_q;
    assign lut_in[i] = is_local ? local_sig : routed_d;
  end
endmodule
