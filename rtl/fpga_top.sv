// Variation-aware FPGA: an 8 x 16 LUT fabric that can measure its own
// within-die speed variation and then be configured around it.
//
// Blocks: a serial configuration chain (config_chain) holds one tile_cfg_t
// per tile plus one output-enable bit per pad; the CLB array (clb_array)
// holds the tiles; each of the ROWS oscillation counters (osc_counter)
// watches the CLB of its row in the column meas_col, and the window timer
// (meas_ctrl) runs all counters together. A measurement configures ring
// oscillators in the fabric (LUTs as inverters and buffers in a loop,
// optionally divided by two in a CLB), then pulses meas_start with the
// window length in clk cycles; when meas_done rises, cnt_value[r] holds the
// number of rising edges seen at CLB (r, meas_col) during the window.
//
// Pads: pad r (r < ROWS) sits west of CLB (r, 0) and pad ROWS + r east of
// CLB (r, COLS-1). io_out carries the edge CLB's output, io_oe its
// configured enable; an input pad (oe = 0) feeds io_in to the fabric, an
// output pad feeds 0.
//
// Configuration: bits are shifted in on cfg_shift and reach the fabric
// together on a cfg_update cycle. Layout, bit 0 shifted in first: tile (r, c) occupies bits
// (r*COLS + c)*TILE_CFG_W and up, the pad enables follow at
// ROWS*COLS*TILE_CFG_W. clk clocks configuration and measurement; fab_clk
// clocks the user flip-flops of the fabric. meas_col is sampled by the start
// of a measurement. The array size, the per-chip measurement by embedded
// counters and the in-CLB divider follow the design; the pad placement,
// configuration interface and measurement handshake are this design's own.
`timescale 1ps/1ps
module fpga_top import fpga_pkg::*; #(
  parameter int unsigned ROWS          = DEF_ROWS,
  parameter int unsigned COLS          = DEF_COLS,
  parameter int unsigned VAR_SEED      = 1,
  parameter int unsigned LUT_NOM_PS    = 250,
  parameter int unsigned RT_NOM_PS     = 100,
  parameter int unsigned VAR_SPREAD_PM = 40,
  parameter int unsigned CW            = 20,
  parameter int unsigned WW            = 24,
  parameter int unsigned SETTLE        = 8,
  localparam int unsigned NIO          = 2 * ROWS,
  localparam int unsigned CFG_BITS     = ROWS * COLS * TILE_CFG_W + NIO,
  localparam int unsigned COLW         = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            fab_clk,
  input  logic            fab_rst_n,
  // configuration
  input  logic            cfg_shift,
  input  logic            cfg_din,
  input  logic            cfg_update,
  output logic            cfg_dout,
  // pads (core side)
  input  logic [NIO-1:0]  io_in,
  output logic [NIO-1:0]  io_out,
  output logic [NIO-1:0]  io_oe,
  // within-die variation measurement
  input  logic            meas_start,
  input  logic [WW-1:0]   meas_window,
  input  logic [COLW-1:0] meas_col,
  output logic            meas_busy,
  output logic            meas_done,
  output logic [CW-1:0]   cnt_value [ROWS]
);
  logic [CFG_BITS-1:0]       cfg_bits;
  tile_cfg_t                 tile_cfg [ROWS][COLS];
  logic [ROWS-1:0][COLS-1:0] clb_o;
  logic [ROWS-1:0]           pad_w_in, pad_e_in;
  logic                      m_clr, m_gate, m_capture;
  logic [COLW-1:0]           col_q;

  config_chain #(.N(CFG_BITS)) u_cfg (
    .clk, .rst_n,
    .shift (cfg_shift),
    .din   (cfg_din),
    .update(cfg_update),
    .dout  (cfg_dout),
    .q     (cfg_bits)
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_cfg_r
    for (genvar c = 0; c < COLS; c++) begin : g_cfg_c
      assign tile_cfg[r][c] = cfg_bits[(r*COLS + c)*TILE_CFG_W +: TILE_CFG_W];
    end
  end
  assign io_oe = cfg_bits[ROWS*COLS*TILE_CFG_W +: NIO];

  for (genvar r = 0; r < ROWS; r++) begin : g_pad
    assign io_out[r]        = clb_o[r][0];
    assign io_out[ROWS + r] = clb_o[r][COLS-1];
    assign pad_w_in[r]      = io_in[r]        & ~io_oe[r];
    assign pad_e_in[r]      = io_in[ROWS + r] & ~io_oe[ROWS + r];
  end

  clb_array #(
    .ROWS (ROWS), .COLS (COLS), .VAR_SEED (VAR_SEED),
    .LUT_NOM_PS (LUT_NOM_PS), .RT_NOM_PS (RT_NOM_PS),
    .VAR_SPREAD_PM (VAR_SPREAD_PM)
  ) u_array (
    .fab_clk, .fab_rst_n,
    .cfg      (tile_cfg),
    .pad_w_in,
    .pad_e_in,
    .clb_o
  );

  meas_ctrl #(.WW(WW), .SETTLE(SETTLE)) u_meas (
    .clk, .rst_n,
    .start   (meas_start),
    .window  (meas_window),
    .clr     (m_clr),
    .gate    (m_gate),
    .capture (m_capture),
    .busy    (meas_busy),
    .done    (meas_done)
  );

  // The observed column changes only when a measurement starts.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      col_q <= '0;
    else if (meas_start && !meas_busy) col_q <= meas_col;
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_cnt
    osc_counter #(.CW(CW)) u_cnt (
      .clk, .rst_n,
      .pulse   (clb_o[r][col_q]),
      .clr     (m_clr),
      .gate    (m_gate),
      .capture (m_capture),
      .count   (cnt_value[r])
    );
  end
endmodule
