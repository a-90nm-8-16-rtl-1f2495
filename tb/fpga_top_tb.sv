// End-to-end testbench of fpga_top at its default size (8 x 16, seed 1).
// It replays the variation-aware flow on one simulated chip:
//   1. pads: a signal from a west input pad crosses a row of 16 buffer CLBs
//      to an east output pad; an output pad's input is masked.
//   2. method (a): every CLB is a one-CLB ring oscillator divided by two;
//      the row counters measure one column at a time (16 measurements).
//   3. method (b): each pair of columns holds one 16-CLB ring, armed in one
//      configuration and released by the next; 8 measurements.
//   4. test circuit: 8 paths of 11 to 13 buffer CLBs between a launching
//      (head) and a capturing (tail) flip-flop, one path per column pair.
//      For the initial placement and for the best and worst placements by
//      method (a) and (b), the shortest working interval between two
//      fab_clk pulses is found by bisection.
// Every count and time is compared with what the delay model predicts on
// its own, and each tail's capture or miss in each trial with its modelled
// path delay. Mechanisms that never occur count as failures.
`timescale 1ps/1ps
module fpga_top_tb import fpga_pkg::*;;
  localparam int unsigned ROWS = DEF_ROWS, COLS = DEF_COLS;
  localparam int unsigned SEED = 1, LNOM = 250, RNOM = 100, SPM = 40;  // the top's defaults
  localparam int unsigned SETTLE = 8, TW = TILE_CFG_W, NIO = 2 * ROWS;
  localparam int unsigned CFG_BITS = ROWS * COLS * TW + NIO;
  localparam int unsigned CLK_PS = 10_000;
  localparam int unsigned NPATH = COLS / 2;
  localparam int unsigned TAIL_POS = 2 * ROWS - 2;

  logic clk = 0, rst_n = 0, fab_clk = 0, fab_rst_n = 0;
  logic cfg_shift = 0, cfg_din = 0, cfg_update = 0, cfg_dout;
  logic [NIO-1:0] io_in = '0, io_out, io_oe;
  logic meas_start = 0;
  logic [23:0] meas_window = '0;
  logic [3:0] meas_col = '0;
  logic meas_busy, meas_done;
  logic [19:0] cnt_value [ROWS];

  fpga_top dut (.*);

  always #(CLK_PS / 2) clk = ~clk;

  int checks = 0, failures = 0;
  tile_cfg_t img [ROWS][COLS];
  logic [NIO-1:0] img_oe;
  logic [CFG_BITS-1:0] loaded = '0;
  int path_len [NPATH] = '{13, 12, 11, 13, 12, 11, 13, 12};
  real lut_est [ROWS][COLS];   // method (a): LUT delay from the one-CLB rings
  real ring_per [NPATH];       // method (b): period of the 16-CLB ring of each pair
  // how often each mechanism was seen
  int n_readback = 0, n_pad_path = 0, n_pad_mask = 0, n_min_ring = 0, n_pair_ring = 0;
  int n_capture = 0, n_miss = 0, n_busy_start = 0, n_gain = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int lut_ps(int r, int c);
    return site_delay_ps(SEED, r, c, KIND_LUT, LNOM, SPM);
  endfunction
  function automatic int hop(int r, int c);
    return site_delay_ps(SEED, r, c, KIND_ROUTE, RNOM, SPM) + lut_ps(r, c);
  endfunction

  // Position k (0..2*ROWS-1) along the snake through column pair p: down
  // column 2p, then up column 2p+1.
  function automatic int pos_r(int k);
    return (k < ROWS) ? k : 2 * ROWS - 1 - k;
  endfunction
  function automatic int pos_c(int p, int k);
    return (k < ROWS) ? 2 * p : 2 * p + 1;
  endfunction
  function automatic src_e pos_src(int k);  // where position k takes its input
    if (k == 0)         return SRC_E;
    if (k < ROWS)       return SRC_N;
    if (k == ROWS)      return SRC_W;
    return SRC_S;
  endfunction

  // ------------------------------------------------------------------
  task automatic clear_img();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        img[r][c] = '0;
        for (int i = 0; i < LUT_K; i++) img[r][c].sel[i] = SRC_ZERO;
      end
    img_oe = '0;
  endtask

  task automatic set_tile(int r, int c, src_e from, logic [15:0] lut,
                          logic ff_out = 0, logic div_en = 0);
    img[r][c].sel[0]     = from;
    img[r][c].clb.lut    = lut;
    img[r][c].clb.ff_out = ff_out;
    img[r][c].clb.div_en = div_en;
  endtask

  // Shift the image in (bit 0 first), check that the previous image comes
  // out on cfg_dout, then update the fabric.
  task automatic load_cfg();
    logic [CFG_BITS-1:0] flat, seen;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) flat[(r*COLS + c)*TW +: TW] = img[r][c];
    flat[ROWS*COLS*TW +: NIO] = img_oe;
    @(negedge clk);
    for (int i = 0; i < CFG_BITS; i++) begin
      seen[i]   = cfg_dout;
      cfg_din   = flat[i];
      cfg_shift = 1;
      @(negedge clk);
    end
    cfg_shift  = 0;
    cfg_update = 1;
    @(negedge clk);
    cfg_update = 0;
    check(seen == loaded, "previous configuration read back on cfg_dout");
    if (seen == loaded && loaded != '0) n_readback++;
    loaded = flat;
    check(io_oe == img_oe, "pad enables follow the configuration");
  endtask

  // Clear configuration and counters (stops every oscillator).
  task automatic chip_reset();
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    loaded = '0;
  endtask

  // One measurement of column `col` over `w` clk cycles; checks the latency.
  task automatic measure(int col, int w, bit poke = 0);
    time t0;
    int cyc;
    @(negedge clk);
    meas_col    = 4'(col);
    meas_window = 24'(w);
    meas_start  = 1;
    @(posedge clk) t0 = $time;
    @(negedge clk) meas_start = 0;
    if (poke) begin
      // a second start while busy, pointing elsewhere, must be ignored
      meas_col   = 4'(col + 1);
      meas_start = 1;
      @(negedge clk) meas_start = 0;
      check(meas_busy, "busy during a measurement");
      n_busy_start++;
    end
    wait (meas_done);
    cyc = int'(($time - t0) / CLK_PS);
    check(cyc == 2 + w + SETTLE + 1, $sformatf("measurement took %0d cycles", cyc));
    @(negedge clk);
  endtask

  // ------------------------------------------------------------------
  // Two fab_clk pulses t_ps apart on a freshly reset fabric; returns which
  // tails captured the launched edge.
  task automatic two_pulses(int t_ps, output logic [NPATH-1:0] got);
    fab_rst_n = 0;
    #1000 fab_rst_n = 1;
    #20000;
    fab_clk = 1; #100 fab_clk = 0;
    #(t_ps - 100);
    fab_clk = 1; #100 fab_clk = 0;
    #100;
    for (int p = 0; p < NPATH; p++) got[p] = dut.clb_o[pos_r(TAIL_POS)][pos_c(p, TAIL_POS)];
  endtask

  function automatic int path_arrival(int len, int pair);
    int s, t;
    s = TAIL_POS - 1 - len;
    t = 0;
    for (int k = s + 1; k <= TAIL_POS; k++) t += hop(pos_r(k), pos_c(pair, k));
    return t;
  endfunction

  function automatic real path_est(int len, int pair, bit method_b);
    real t;
    int s;
    s = TAIL_POS - 1 - len;
    if (method_b) return ring_per[pair] / 2.0 * real'(len + 1) / real'(2 * ROWS);
    t = 0.0;
    for (int k = s + 1; k <= TAIL_POS; k++) t += lut_est[pos_r(k)][pos_c(pair, k)];
    return t;
  endfunction

  // Configure the test circuit with path i in column pair perm[i], and find
  // by bisection the shortest working pulse interval.
  task automatic run_placement(int perm [NPATH], string name, output int tmin);
    int lo, hi, mid, model;
    logic [NPATH-1:0] got;
    int arr [NPATH];
    chip_reset();
    clear_img();
    model = 0;
    for (int i = 0; i < NPATH; i++) begin
      int p, s;
      p = perm[i];
      s = TAIL_POS - 1 - path_len[i];
      set_tile(pos_r(s), pos_c(p, s), SRC_Q, LUT_INV0, 1);  // head: toggles on fab_clk
      for (int k = s + 1; k < TAIL_POS; k++)
        set_tile(pos_r(k), pos_c(p, k), pos_src(k), LUT_BUF0);
      set_tile(pos_r(TAIL_POS), pos_c(p, TAIL_POS), pos_src(TAIL_POS), LUT_BUF0, 1);  // tail
      arr[p] = path_arrival(path_len[i], p);
      if (arr[p] > model) model = arr[p];
    end
    load_cfg();
    lo = 1000;
    hi = 20000;
    while (hi - lo > 1) begin
      mid = (lo + hi) / 2;
      two_pulses(mid, got);
      for (int p = 0; p < NPATH; p++) begin
        if (arr[p] < mid - 1) begin
          check(got[p] == 1, $sformatf("%s: path in pair %0d (%0d ps) captured at %0d ps",
                                       name, p, arr[p], mid));
          n_capture++;
        end else if (arr[p] > mid + 1) begin
          check(got[p] == 0, $sformatf("%s: path in pair %0d (%0d ps) missed at %0d ps",
                                       name, p, arr[p], mid));
          n_miss++;
        end
      end
      if (&got) hi = mid;
      else      lo = mid;
    end
    tmin = hi;
    check(tmin >= model && tmin <= model + 2,
          $sformatf("%s: shortest interval %0d ps, model %0d ps", name, tmin, model + 1));
    $display("placement %-8s: pairs %p, shortest pulse interval %0d ps (%.1f MHz)",
             name, perm, tmin, 1.0e6 / real'(tmin));
  endtask

  // Best (minimum of the worst estimated path) or worst placement over all
  // assignments of the eight paths to the eight column pairs.
  task automatic choose(bit method_b, bit best, output int perm [NPATH]);
    int cur [NPATH];
    real score, best_score;
    bit first;
    first = 1;
    for (int i = 0; i < NPATH; i++) cur[i] = i;
    forever begin
      score = 0.0;
      for (int i = 0; i < NPATH; i++) begin
        real e;
        e = path_est(path_len[i], cur[i], method_b);
        if (e > score) score = e;
      end
      if (first || (best && score < best_score) || (!best && score > best_score)) begin
        best_score = score;
        perm = cur;
        first = 0;
      end
      // next permutation in lexicographic order
      begin
        int i, j;
        i = NPATH - 2;
        while (i >= 0 && cur[i] > cur[i+1]) i--;
        if (i < 0) break;
        j = NPATH - 1;
        while (cur[j] < cur[i]) j--;
        {cur[i], cur[j]} = {cur[j], cur[i]};
        for (int a = i + 1, b = NPATH - 1; a < b; a++, b--) {cur[a], cur[b]} = {cur[b], cur[a]};
      end
    end
  endtask

  // ------------------------------------------------------------------
  initial begin : watchdog
    #20_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm [NPATH], t_init, t_ba, t_wa, t_bb, t_wb, t;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fab_rst_n = 1;
    check(!meas_busy && !meas_done && io_oe == '0, "idle after reset");

    // 1. pads --------------------------------------------------------
    clear_img();
    for (int c = 0; c < COLS; c++) set_tile(3, c, SRC_W, LUT_BUF0);  // west pad 3 -> east pad 11
    for (int c = 0; c < COLS; c++) set_tile(5, c, SRC_E, LUT_BUF0);  // east pad 13 -> west pad 5
    img_oe[ROWS + 3] = 1;
    img_oe[5]        = 1;
    img_oe[ROWS + 5] = 1;   // pad 13 is an output: its input must not reach the fabric
    load_cfg();
    t = 0;
    for (int c = 0; c < COLS; c++) t += hop(3, c);
    for (int k = 0; k < 4; k++) begin
      io_in[3] = ~io_in[3];
      #(t - 1) check(io_out[ROWS + 3] != io_in[3], "pad path: not before its delay");
      #2 check(io_out[ROWS + 3] == io_in[3], "pad path: west input reaches east output");
      if (io_out[ROWS + 3] == io_in[3]) n_pad_path++;
      #5000;
    end
    io_in[ROWS + 5] = 1;
    #20000 check(io_out[5] == 0, "input of an output pad is masked");
    n_pad_mask++;
    img_oe[ROWS + 5] = 0;
    load_cfg();
    #20000 check(io_out[5] == 1, "same pad as input reaches the far side");
    io_in = '0;

    // 2. method (a): one-CLB rings with the in-CLB divider ------------
    chip_reset();
    clear_img();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) set_tile(r, c, SRC_LUT, LUT_INV0, 1, 1);
    load_cfg();
    for (int c = 0; c < COLS; c++) begin
      measure(c, 100, c == 0);
      for (int r = 0; r < ROWS; r++) begin
        int expc;
        expc = 100 * CLK_PS / (4 * lut_ps(r, c));
        check(int'(cnt_value[r]) >= expc - 3 && int'(cnt_value[r]) <= expc + 3,
              $sformatf("one-CLB ring (%0d,%0d): count %0d, expected %0d",
                        r, c, cnt_value[r], expc));
        lut_est[r][c] = real'(100 * CLK_PS) / (4.0 * real'(cnt_value[r]));
        n_min_ring++;
      end
    end

    // 3. method (b): one 16-CLB ring per column pair -------------------
    chip_reset();
    clear_img();
    for (int p = 0; p < NPATH; p++)
      for (int k = 0; k < 2 * ROWS; k++)
        set_tile(pos_r(k), pos_c(p, k), pos_src(k), (k == 0) ? 16'h0000 : LUT_BUF0);
    load_cfg();            // armed: the inverter is held at 0, the ring settles
    #50000;
    for (int p = 0; p < NPATH; p++) set_tile(0, 2 * p, SRC_E, LUT_INV0);
    load_cfg();            // released: one edge runs round each ring
    for (int p = 0; p < NPATH; p++) begin
      int per, expc;
      per = 0;
      for (int k = 0; k < 2 * ROWS; k++) per += 2 * hop(pos_r(k), pos_c(p, k));
      measure(2 * p, 2000);
      expc = 2000 * CLK_PS / per;
      for (int r = 0; r < ROWS; r++)
        check(int'(cnt_value[r]) >= expc - 3 && int'(cnt_value[r]) <= expc + 3,
              $sformatf("pair %0d ring seen in row %0d: count %0d, expected %0d",
                        p, r, cnt_value[r], expc));
      ring_per[p] = real'(2000 * CLK_PS) / real'(cnt_value[0]);
      n_pair_ring++;
      $display("pair %0d: 16-CLB ring period %0d ps (model), %.1f ps (measured)",
               p, per, ring_per[p]);
    end

    // 4. test circuit under five placements --------------------------
    for (int i = 0; i < NPATH; i++) perm[i] = i;
    run_placement(perm, "initial", t_init);
    choose(0, 1, perm); run_placement(perm, "best(a)", t_ba);
    choose(0, 0, perm); run_placement(perm, "worst(a)", t_wa);
    choose(1, 1, perm); run_placement(perm, "best(b)", t_bb);
    choose(1, 0, perm); run_placement(perm, "worst(b)", t_wb);
    check(t_bb <= t_wb, "method (b): best placement no slower than worst");
    check(t_ba <= t_wa, "method (a): best placement no slower than worst");
    check(t_bb <= t_init, "method (b): best placement no slower than the initial one");
    if (t_bb < t_wb) n_gain++;
    $display("speed gain best over worst: (a) %.2f %%, (b) %.2f %%",
             100.0 * (real'(t_wa) / real'(t_ba) - 1.0), 100.0 * (real'(t_wb) / real'(t_bb) - 1.0));

    // every mechanism must have happened
    check(n_readback > 0,   "configuration readback seen");
    check(n_pad_path > 0,   "pad-to-pad path seen");
    check(n_pad_mask > 0,   "output-pad masking seen");
    check(n_busy_start > 0, "start while busy seen");
    check(n_min_ring == ROWS * COLS, "every one-CLB ring measured");
    check(n_pair_ring == NPATH, "every column-pair ring measured");
    check(n_capture > 0,    "tail capture seen");
    check(n_miss > 0,       "tail miss (too short an interval) seen");
    check(n_gain > 0,       "placement gain seen");
    $display("mechanisms: readback %0d, pad path %0d, pad mask %0d, busy start %0d, min rings %0d, pair rings %0d, captures %0d, misses %0d",
             n_readback, n_pad_path, n_pad_mask, n_busy_start, n_min_ring, n_pair_ring,
             n_capture, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
