// Measurement window timer for the oscillation counters.
//
// A start pulse while idle runs one measurement: two cycles of clr to empty
// the counters, then gate high for exactly `window` clk cycles, then SETTLE
// cycles for the counters to stop, then one cycle of capture, after which
// done goes high and stays high until the next start. busy is high from the
// cycle after start until done. From the clk edge that samples start to
// done high takes 2 + window + SETTLE + 1 cycles. A start while busy is
// ignored; window = 0 skips the gate.
//
// Counting "within a certain time" follows the design; the programmable
// length, the clear and settle phases and the handshake are this design's
// own choice.
`timescale 1ps/1ps
module meas_ctrl #(
  parameter int unsigned WW     = 24,
  parameter int unsigned SETTLE = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [WW-1:0] window,
  output logic          clr,
  output logic          gate,
  output logic          capture,
  output logic          busy,
  output logic          done
);
  typedef enum logic [2:0] {S_IDLE, S_CLR, S_GATE, S_SETTLE, S_CAPT} state_e;

  state_e        state, state_nx;
  logic [WW-1:0] n, n_nx;

  always_comb begin
    state_nx = state;
    n_nx     = n;
    unique case (state)
      S_IDLE: if (start) begin
        state_nx = S_CLR;
        n_nx     = WW'(1);
      end
      S_CLR: begin
        if (n == '0) begin
          state_nx = (window == '0) ? S_SETTLE : S_GATE;
          n_nx     = (window == '0) ? WW'(SETTLE - 1) : window - 1'b1;
        end else n_nx = n - 1'b1;
      end
      S_GATE: begin
        if (n == '0) begin
          state_nx = S_SETTLE;
          n_nx     = WW'(SETTLE - 1);
        end else n_nx = n - 1'b1;
      end
      S_SETTLE: begin
        if (n == '0) state_nx = S_CAPT;
        else         n_nx = n - 1'b1;
      end
      S_CAPT:  state_nx = S_IDLE;
      default: state_nx = S_IDLE;
    endcase
  end

  // The controls are registered (decoded from the next state) so that clr,
  // which resets the counters asynchronously, is glitch-free.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      n       <= '0;
      clr     <= 1'b0;
      gate    <= 1'b0;
      capture <= 1'b0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      state   <= state_nx;
      n       <= n_nx;
      clr     <= (state_nx == S_CLR);
      gate    <= (state_nx == S_GATE);
      capture <= (state_nx == S_CAPT);
      busy    <= (state_nx != S_IDLE);
      if (state == S_IDLE && start) done <= 1'b0;
      else if (state == S_CAPT)     done <= 1'b1;
    end
  end

  initial assert (SETTLE >= 1) else $error("SETTLE must be at least 1");
endmodule
