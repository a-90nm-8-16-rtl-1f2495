// Shared types and constants of the variation-aware FPGA.
//
// The fabric is an array of tiles; each tile holds a switch matrix (SWM)
// that picks the four inputs of a 4-input LUT, and a CLB with that LUT, one
// flip-flop and the elements that turn the flip-flop into a divide-by-two
// stage for ring-oscillator measurement. A tile is configured by a
// tile_cfg_t word taken from the serial configuration chain.
//
// site_delay_ps() is the within-die variation model used by the behavioural
// delay cells: every LUT and every routing hop on the die gets its own delay,
// nominal +- a spread, drawn by a fixed hash of (seed, row, column, kind) so
// that one seed stands for one fabricated chip. The +-4 % default spread
// matches the size of within-die variation the design targets; the nominal
// delays are this model's own choice.
`timescale 1ps/1ps
package fpga_pkg;

  localparam int unsigned LUT_K      = 4;   // LUT inputs
  localparam int unsigned DEF_ROWS   = 8;   // CLB rows
  localparam int unsigned DEF_COLS   = 16;  // CLB columns

  // Source of one LUT input, chosen by the tile's SWM.
  typedef enum logic [2:0] {
    SRC_LUT  = 3'd0,  // own delayed LUT output (local feedback, no routing hop)
    SRC_N    = 3'd1,  // CLB above (row - 1)
    SRC_E    = 3'd2,  // CLB to the right (column + 1), or east pad
    SRC_S    = 3'd3,  // CLB below (row + 1)
    SRC_W    = 3'd4,  // CLB to the left (column - 1), or west pad
    SRC_Q    = 3'd5,  // own flip-flop (local)
    SRC_ZERO = 3'd6,
    SRC_ONE  = 3'd7
  } src_e;

  typedef struct packed {
    logic [2**LUT_K-1:0] lut;     // truth table, bit i = f(inputs == i)
    logic                ff_out;  // 1: CLB output is the flip-flop, 0: the LUT
    logic                div_en;  // 1: flip-flop clocked by the LUT output, D = ~Q
  } clb_cfg_t;

  typedef struct packed {
    src_e [LUT_K-1:0] sel;        // sel[i] drives LUT input i
    clb_cfg_t         clb;
  } tile_cfg_t;

  localparam int unsigned TILE_CFG_W = $bits(tile_cfg_t);

  // Common truth tables (input 0 is the least significant index bit).
  localparam logic [15:0] LUT_BUF0 = 16'hAAAA;  // f = in0
  localparam logic [15:0] LUT_INV0 = 16'h5555;  // f = ~in0

  localparam int unsigned KIND_LUT   = 0;
  localparam int unsigned KIND_ROUTE = 1;

  // Delay of one site: nominal +- nominal*spread_pm/1000, uniformly spread.
  function automatic int unsigned site_delay_ps(int unsigned seed, int unsigned row,
                                                int unsigned col, int unsigned kind,
                                                int unsigned nominal_ps,
                                                int unsigned spread_pm);
    logic [31:0] h;
    int unsigned span;
    h = seed * 32'h9E37_79B9 ^ row * 32'h85EB_CA6B ^ col * 32'hC2B2_AE35
        ^ (kind + 1) * 32'h27D4_EB2F;
    h = h ^ (h >> 16);
    h = h * 32'h7FEB_352D;
    h = h ^ (h >> 15);
    h = h * 32'h846C_A68B;
    h = h ^ (h >> 16);
    span = nominal_ps * spread_pm / 1000;
    return nominal_ps - span + (h % (2 * span + 1));
  endfunction

endpackage
