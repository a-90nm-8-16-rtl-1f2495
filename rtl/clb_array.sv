// The ROWS x COLS array of tiles, each a switch matrix (swm) feeding a CLB.
//
// Tiles connect to their four nearest neighbours: a tile's north input is
// the output of the CLB in the row above, its east input the CLB to its
// right, and so on. Off the array, north and south inputs read 0, and the
// west and east inputs of the edge columns read the pad inputs pad_w_in[r]
// and pad_e_in[r]. Every CLB output leaves the array on clb_o, for the pads
// and the oscillation counters.
//
// Each tile's LUT delay and routing-hop delay come from
// fpga_pkg::site_delay_ps() with this instance's VAR_SEED, so the array
// behaves like one particular die with its own within-die variation. The
// 8 x 16 size follows the design (a column holds 8 CLBs); the neighbour
// wiring and pad placement are this design's own choice. No clock of its own:
// fab_clk and fab_rst_n go to every CLB flip-flop.
//
// Lint reports circular combinational logic through the neighbour wiring.
// It stands on purpose: programmable routing can close loops, and closing
// one through LUTs is exactly how this fabric builds its ring oscillators.
// Any configuration that is not meant to oscillate is loop-free.
`timescale 1ps/1ps
module clb_array import fpga_pkg::*; #(
  parameter int unsigned ROWS         = DEF_ROWS,
  parameter int unsigned COLS         = DEF_COLS,
  parameter int unsigned VAR_SEED     = 1,
  parameter int unsigned LUT_NOM_PS   = 250,
  parameter int unsigned RT_NOM_PS    = 100,
  parameter int unsigned VAR_SPREAD_PM = 40
) (
  input  logic                      fab_clk,
  input  logic                      fab_rst_n,
  input  tile_cfg_t                 cfg [ROWS][COLS],
  input  logic [ROWS-1:0]           pad_w_in,
  input  logic [ROWS-1:0]           pad_e_in,
  output logic [ROWS-1:0][COLS-1:0] clb_o
);
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned LUT_PS =
        site_delay_ps(VAR_SEED, r, c, KIND_LUT, LUT_NOM_PS, VAR_SPREAD_PM);
      localparam int unsigned RT_PS =
        site_delay_ps(VAR_SEED, r, c, KIND_ROUTE, RT_NOM_PS, VAR_SPREAD_PM);

      logic n_in, e_in, s_in, w_in, lut_d, q;
      logic [LUT_K-1:0] lut_in;

      if (r == 0)        begin : g_n_edge assign n_in = 1'b0; end
      else               begin : g_n      assign n_in = clb_o[r-1][c]; end
      if (r == ROWS - 1) begin : g_s_edge assign s_in = 1'b0; end
      else               begin : g_s      assign s_in = clb_o[r+1][c]; end
      if (c == 0)        begin : g_w_edge assign w_in = pad_w_in[r]; end
      else               begin : g_w      assign w_in = clb_o[r][c-1]; end
      if (c == COLS - 1) begin : g_e_edge assign e_in = pad_e_in[r]; end
      else               begin : g_e      assign e_in = clb_o[r][c+1]; end

      swm #(.RT_DELAY_PS(RT_PS)) u_swm (
        .sel      (cfg[r][c].sel),
        .self_lut (lut_d),
        .self_q   (q),
        .n_in, .e_in, .s_in, .w_in,
        .lut_in
      );

      clb #(.LUT_DELAY_PS(LUT_PS)) u_clb (
        .fab_clk,
        .fab_rst_n,
        .cfg    (cfg[r][c].clb),
        .lut_in,
        .lut_d,
        .q,
        .o      (clb_o[r][c])
      );
    end
  end
endmodule
