// tb_sonos_tile_full: the tile at its default size (four 1152 x 256 cores) running one MVM layer end to end.
//
// The testbench programs weights, gains and biases, streams activations into
// the 32 receive-FIFO lanes, runs layers and compares every byte the tile
// sends with a reference computed here from the same numbers: the bit-serial
// row drive (including signed steering and row gating), the integrate-and-
// halve accumulation, the amplifier gain, ADC clipping, core summation, bias,
// ReLU, rescaling and pooling. It also checks the machine-cycle latency of an
// operation and counts how often each mechanism of the tile occurred
// (pipelined operations in flight, input stalls, FIFO back-pressure, ADC
// clipping at both ends, signed inputs, row gating, each ALU mode, both
// pooling kinds, MVM and non-MVM layers and the switch between them); a
// mechanism that never occurred counts as a failure.
module tb_sonos_tile_full;
  import sonos_pkg::*;

  localparam int R  = sonos_pkg::ROWS;
  localparam int C  = sonos_pkg::COLS;
  localparam int MC = 295;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #1 clk = ~clk;

  int checks = 0, failures = 0;

  // ---- DUT -------------------------------------------------------------------
  logic              cfg_we = 1'b0, run = 1'b0;
  tile_cfg_t         cfg_in;
  logic              busy, done;
  logic [15:0]       stall_cnt, launched;
  logic [31:0]       rx_valid, rx_ready;
  logic [7:0]        rx_data [32];
  logic              tx_valid;
  logic [7:0]        tx_data [32];
  logic              prog_we = 1'b0;
  logic [1:0]        prog_core;
  logic [$clog2(R)-1:0] prog_row;
  logic signed [7:0] prog_w [C];
  logic              gain_we = 1'b0;
  logic [1:0]        gain_core;
  logic [$clog2(C)-1:0] gain_col;
  logic [15:0]       gain_code;
  logic              bias_we = 1'b0;
  logic [$clog2(4*C)-1:0] bias_idx;
  logic signed [11:0] bias_val;

  sonos_tile  dut (
    .clk, .rst_n, .cfg_we, .cfg_in, .run, .busy, .done, .stall_cnt, .launched,
    .rx_valid, .rx_data, .rx_ready, .tx_valid, .tx_data,
    .prog_we, .prog_core, .prog_row, .prog_w,
    .gain_we, .gain_core, .gain_col, .gain_code,
    .bias_we, .bias_idx, .bias_val
  );

  // ---- reference state ----------------------------------------------------
  int W    [4][R][C];
  int G    [4][C];
  int B    [4*C];
  typedef int xop_t [4][R];

  // mechanism counters
  int n_inflight2 = 0, n_stall = 0, n_bp = 0, n_clip_hi = 0, n_clip_lo = 0;
  int n_signed = 0, n_gated = 0, n_none = 0, n_sum2 = 0, n_sum4 = 0;
  int n_pmax = 0, n_pavg = 0, n_nonmvm = 0, n_mvm = 0, n_switch = 0, n_relu_sat = 0;
  int n_lat = 0;

  // ---- stimulus: one byte queue per FIFO lane ---------------------------------
  int lane_q [32][$];
  bit feed_en = 1'b1;

  always_ff @(posedge clk) begin
    for (int b = 0; b < 32; b++) begin
      if (rx_valid[b] && rx_ready[b]) void'(lane_q[b].pop_front());
      if (rx_valid[b] && !rx_ready[b]) n_bp++;
    end
  end
  always_comb begin
    for (int b = 0; b < 32; b++) begin
      rx_valid[b] = feed_en && (lane_q[b].size() > 0);
      rx_data[b]  = (lane_q[b].size() > 0) ? 8'(lane_q[b][0]) : 8'h00;
    end
  end

  // ---- output monitor -------------------------------------------------------------
  int exp_q [$][$];   // expected bytes per operation
  int run_bytes [$];
  bit in_run = 1'b0;
  int ops_out = 0;
  longint launch_time [$];
  longint t_now = 0;
  logic [15:0] launched_q = '0;
  bit          launched_q_ok = 1'b0;  // launched_q holds a post-reset value

  always @(posedge clk) begin
    t_now++;
    if (rst_n && launched_q_ok && launched > launched_q) launch_time.push_back(t_now);
    launched_q_ok <= rst_n;
    launched_q <= launched;
    if (int'(launched) - ops_out >= 2 && busy) n_inflight2++;
    if (tx_valid) begin
      for (int i = 0; i < 32; i++) run_bytes.push_back(int'(tx_data[i]));
      in_run = 1'b1;
    end else if (in_run) begin
      in_run = 1'b0;
      compare_run();
    end
  end

  task automatic compare_run();
    int e [$];
    int bad;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL: unexpected output of %0d bytes", run_bytes.size());
    end else begin
      e = exp_q.pop_front();
      bad = 0;
      if (run_bytes.size() != ((e.size() + 31) / 32) * 32) bad++;
      for (int i = 0; i < e.size() && i < run_bytes.size(); i++)
        if (run_bytes[i] != e[i]) begin
          if (bad < 4) $display("FAIL: op %0d byte %0d got %0d exp %0d", ops_out, i, run_bytes[i], e[i]);
          bad++;
        end
      if (bad != 0) failures++;
      // latency: 4 machine cycles (MVM) or 2 (non-MVM) after the launch, then out
      if (launch_time.size() > 0) begin
        longint dt;
        dt = t_now - launch_time.pop_front();
        checks++;
        if (dt != exp_lat_cyc + (e.size() + 31) / 32) begin
          failures++;
          $display("FAIL: op %0d latency %0d clocks, expected %0d", ops_out, dt, exp_lat_cyc + (e.size() + 31) / 32);
        end else n_lat++;
      end
    end
    ops_out++;
    run_bytes.delete();
  endtask

  int exp_lat_cyc;  // clocks from launch (mid-cycle) to the first output word

  // ---- reference model ---------------------------------------------------------------
  function automatic int adc_code(int c, int col, xop_t x, bit sgn, int nrows);
    longint s, acc, v;
    s = 0;
    for (int k = 0; k < 8; k++) begin
      longint ik;
      ik = 0;
      for (int r = 0; r < nrows; r++) begin
        bit on;
        if (!sgn) on = x[c][r][k];
        else if (k == 7) on = 0;
        else if (r % 2 == 0) on = x[c][r][k] && !x[c][r][7];
        else on = x[c][r-1][k] && x[c][r-1][7];
        if (on) ik += W[c][r][col];
      end
      s += ik <<< k;
    end
    acc = 20 * s;                          // T_INT * 2^(ACC_FRAC-7)
    v = (acc * G[c][col]) >>> 24;          // GAIN_SHIFT + ACC_FRAC
    if (v > 8388607) v = 8388607;
    if (v < -8388608) v = -8388608;
    if (v > 127) n_clip_hi++;
    if (v < -128) n_clip_lo++;
    if (v + 128 > 255) return 255;
    if (v + 128 < 0) return 0;
    return int'(v) + 128;
  endfunction

  function automatic int rescale(int x, bit relu, int sc, int sh);
    longint p;
    if (relu && x < 0) x = 0;
    p = (longint'(x) * sc) >>> sh;
    if (relu) begin
      if (p > 255) begin n_relu_sat++; return 255; end
      return int'(p);
    end
    if (p > 127) return 127;
    if (p < -128) return -128;
    return int'(p);
  endfunction

  // expected bytes of one operation
  function automatic void expect_op(tile_cfg_t cf, xop_t x);
    int opv [4][C > 64 ? C : 64];   // operand per core and lane index
    int nl, e [$];
    int nsets;
    bit mvm;
    mvm   = (cf.mode == MODE_MVM);
    nl    = mvm ? int'(cf.n_cols) : int'(cf.n_rows);
    nsets = nl / 16;
    for (int c = 0; c < 4; c++)
      for (int j = 0; j < nl; j++)
        opv[c][j] = mvm ? adc_code(c, j, x, cf.signed_in, int'(cf.n_rows)) - 128 : x[c][j];
    for (int s = 0; s < nsets; s++) begin
      int res [4][16];
      bit gv [4];
      for (int g = 0; g < 4; g++) begin
        gv[g] = (cf.alu_mode == ALU_SUM4) ? (g == 0) :
                (cf.alu_mode == ALU_SUM2) ? (g == 0 || g == 2) : 1'b1;
        for (int l = 0; l < 16; l++) begin
          int v, j;
          j = 16*s + l;
          if (cf.alu_mode == ALU_SUM4)      v = opv[0][j] + opv[1][j] + opv[2][j] + opv[3][j];
          else if (cf.alu_mode == ALU_SUM2) v = (g == 0) ? opv[0][j] + opv[1][j] : opv[2][j] + opv[3][j];
          else                              v = opv[g][j];
          if (cf.bias_en) v += B[g*C + (j % C)];
          res[g][l] = rescale(v, cf.relu_en, int'(cf.scale), int'(cf.shift));
        end
      end
      if (cf.pool != POOL_OFF) begin
        for (int l = 0; l < 16; l++) begin
          int m, sm;
          m = res[0][l]; sm = 0;
          for (int g = 0; g < 4; g++) begin
            if (res[g][l] > m) m = res[g][l];
            sm += res[g][l];
          end
          e.push_back(((cf.pool == POOL_MAX) ? m : (sm >>> 2)) & 255);
        end
      end else begin
        for (int g = 0; g < 4; g++)
          if (gv[g]) for (int l = 0; l < 16; l++) e.push_back(res[g][l] & 255);
      end
    end
    exp_q.push_back(e);
  endfunction

  // ---- helpers ----------------------------------------------------------------------------
  task automatic program_all(int wmax, int gmin, int gmax);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < R; r++) begin
        @(negedge clk);
        prog_we = 1'b1; prog_core = 2'(c); prog_row = ($clog2(R))'(r);
        for (int j = 0; j < C; j++) begin
          W[c][r][j] = $urandom_range(2*wmax) - wmax;
          // most weights are small, as in trained networks
          if ($urandom_range(3) != 0) W[c][r][j] = W[c][r][j] / 8;
          prog_w[j] = 8'(W[c][r][j]);
        end
      end
    @(negedge clk); prog_we = 1'b0;
    for (int c = 0; c < 4; c++)
      for (int j = 0; j < C; j++) begin
        @(negedge clk);
        G[c][j] = $urandom_range(gmax, gmin);
        gain_we = 1'b1; gain_core = 2'(c); gain_col = ($clog2(C))'(j); gain_code = 16'(G[c][j]);
      end
    @(negedge clk); gain_we = 1'b0;
    for (int i = 0; i < 4*C; i++) begin
      @(negedge clk);
      B[i] = $urandom_range(400) - 200;
      bias_we = 1'b1; bias_idx = ($clog2(4*C))'(i); bias_val = 12'(B[i]);
    end
    @(negedge clk); bias_we = 1'b0;
  endtask

  function automatic xop_t make_op(tile_cfg_t cf);
    xop_t x;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < R; r++) begin
        if (cf.signed_in) x[c][r] = (r % 2 == 0) ? $urandom_range(255) : 0;
        else x[c][r] = $urandom_range(255);
      end
    return x;
  endfunction

  task automatic send_op(xop_t x, int nrows);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < nrows; r++) lane_q[8*c + (r % 8)].push_back(x[c][r]);
  endtask

  bit last_mvm_set = 0, last_mvm = 0;

  // run one layer: n operations; inputs sent at once, or after `delay_mc`
  // machine cycles (stall), optionally all pushed at once (back-pressure)
  task automatic run_layer(tile_cfg_t cf, int nops, int delay_mc);
    xop_t ops [$];
    int stalls0;
    bit mvm;
    mvm = (cf.mode == MODE_MVM);
    if (last_mvm_set && last_mvm != mvm) n_switch++;
    last_mvm_set = 1; last_mvm = mvm;
    if (mvm) n_mvm++; else n_nonmvm++;
    if (cf.signed_in) n_signed++;
    if (mvm && int'(cf.n_rows) < R) n_gated++;
    if (cf.alu_mode == ALU_NONE) n_none++;
    if (cf.alu_mode == ALU_SUM2) n_sum2++;
    if (cf.alu_mode == ALU_SUM4) n_sum4++;
    if (cf.pool == POOL_MAX) n_pmax++;
    if (cf.pool == POOL_AVG) n_pavg++;
    exp_lat_cyc = mvm ? (MC - 148) + 3*MC : (MC - 148) + MC;
    for (int i = 0; i < nops; i++) begin
      ops.push_back(make_op(cf));
      expect_op(cf, ops[i]);
    end
    @(negedge clk); cfg_we = 1'b1; cfg_in = cf;
    @(negedge clk); cfg_we = 1'b0; run = 1'b1;
    @(negedge clk); run = 1'b0;
    if (delay_mc > 0) repeat (delay_mc * MC) @(negedge clk);
    foreach (ops[i]) send_op(ops[i], int'(cf.n_rows));
    stalls0 = 0;
    fork
      begin : wait_done
        while (!done) @(negedge clk);
      end
      begin : guard
        repeat ((nops + 8 + delay_mc) * MC * 2) @(negedge clk);
        $display("FAIL: layer did not finish");
        failures++;
      end
    join_any
    disable fork;
    repeat (4) @(negedge clk);
    if (delay_mc > 0 && stall_cnt > 0) n_stall += int'(stall_cnt);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d operations produced no output", exp_q.size());
      exp_q.delete();
    end
    checks++;
    if (int'(launched) != nops) begin failures++; $display("FAIL: launched %0d of %0d", launched, nops); end
  endtask

  function automatic tile_cfg_t mk(tile_mode_e md, bit sgn, int nr, int nc, int nm,
                                   alu_mode_e am, bit be, bit re, pool_e pl, int sc, int sh);
    tile_cfg_t c;
    c = '0;
    c.mode = md; c.signed_in = sgn; c.n_rows = 11'(nr); c.n_cols = 9'(nc); c.n_mvm = 16'(nm);
    c.alu_mode = am; c.bias_en = be; c.relu_en = re; c.adc_operands = (md == MODE_MVM);
    c.pool = pl; c.scale = 8'(sc); c.shift = 5'(sh);
    return c;
  endfunction

  // ---- watchdog ------------------------------------------------------------------------------
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- test ----------------------------------------------------------------------------------
  initial begin
    for (int b = 0; b < 32; b++) lane_q[b].delete();
    cfg_in = '0; prog_core = '0; prog_row = '0; gain_core = '0; gain_col = '0;
    gain_code = '0; bias_idx = '0; bias_val = '0;
    for (int j = 0; j < C; j++) prog_w[j] = '0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    program_all(127, 200, 4000);
    // full-size MVM layer: 1152 inputs per core, 256 columns, four partial sums
    run_layer(mk(MODE_MVM, 0, R, C, 3, ALU_SUM4, 1, 1, POOL_OFF, 12, 4), 3, 1);
    // ---- every mechanism must have happened
    check_seen("operations in flight together", n_inflight2);
    check_seen("input stall", n_stall);
    check_seen("ADC clipping high", n_clip_hi);
    check_seen("ADC clipping low", n_clip_lo);
    check_seen("MVM layer", n_mvm);
    check_seen("latency checked", n_lat);
    check_seen("ALU sum of four cores", n_sum4);

    $display("mechanisms: inflight2=%0d stall=%0d backpressure=%0d clip_hi=%0d clip_lo=%0d signed=%0d gated=%0d none=%0d sum2=%0d sum4=%0d maxpool=%0d avgpool=%0d relu_sat=%0d mvm=%0d nonmvm=%0d switch=%0d",
             n_inflight2, n_stall, n_bp, n_clip_hi, n_clip_lo, n_signed, n_gated, n_none, n_sum2, n_sum4, n_pmax, n_pavg, n_relu_sat, n_mvm, n_nonmvm, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism never happened: %s", what);
    end
  endtask

endmodule
