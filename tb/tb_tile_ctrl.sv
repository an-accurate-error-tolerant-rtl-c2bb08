// tb_tile_ctrl: runs the machine-cycle sequencer for an MVM layer and a
// non-MVM layer with the bank-ready input randomly withheld. Every event is
// binned by machine cycle and compared with the schedule implied by the
// launches: n_reads SRAM reads in the launch cycle after clock HALF, then
// (MVM) core_start, ramp_start plus n_cols/8 transfer clocks from clock 259,
// n_sets ALU set starts, and ceil(out_bytes/32) output words in the next
// four cycles (non-MVM: ALU and output in the next two). Also checks that a
// launch only happens at clock HALF with the banks ready, that stall_cnt
// counts the cycles refused, that pp toggles every 295 clocks, and done.
// The stage order follows the design; the launch rule and clock positions are this implementation's choices.
module tb_tile_ctrl;
  import sonos_pkg::*;
  localparam int MC = MC_CYCLES, HALF = MC / 2, NM = 6, MAXM = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, run = 0, banks_ready = 0;
  tile_cfg_t cfg;
  logic [11:0] out_bytes;
  logic [10:0] n_reads;
  logic pp, drain_en, ld_re, ld_we, core_start, ramp_start, xfer_we, set_start, tout_wclr, tx_valid, busy, done;
  logic [8:0] mc_cnt;
  logic [7:0] ld_widx;
  logic [4:0] xfer_idx;
  logic [5:0] set_idx, tout_ridx;
  logic [15:0] stall_cnt, launched;
  always #5 clk = ~clk;

  tile_ctrl dut (.clk, .rst_n, .cfg, .run, .banks_ready, .out_bytes, .n_reads, .pp, .mc_cnt,
    .drain_en, .ld_re, .ld_we, .ld_widx, .core_start, .ramp_start, .xfer_we, .xfer_idx,
    .set_start, .set_idx, .tout_wclr, .tx_valid, .tout_ridx, .busy, .done, .stall_cnt, .launched);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic layer(bit mvm);
    int ld [MAXM], cs [MAXM], rs [MAXM], xw [MAXM], ss [MAXM], tx [MAXM], lau [MAXM], stl [MAXM];
    int m, nl, nst, last_pp, since, done_m;
    int n_rd, n_x, n_s, n_o;
    foreach (ld[i]) begin ld[i] = 0; cs[i] = 0; rs[i] = 0; xw[i] = 0; ss[i] = 0; tx[i] = 0; lau[i] = 0; stl[i] = 0; end
    cfg = '0;
    cfg.mode   = mvm ? MODE_MVM : MODE_NONMVM;
    cfg.n_rows = mvm ? 11'd1152 : 11'd256;
    cfg.n_cols = 9'd256;
    cfg.n_mvm  = 16'(NM);
    out_bytes  = mvm ? 12'd100 : 12'd256;
    n_rd = mvm ? 144 : 32;
    n_x = 32;
    n_s = 16;
    n_o = mvm ? 4 : 8;
    @(negedge clk); run = 1;
    @(negedge clk); run = 0;
    m = -1; nl = 0; nst = 0; since = 0; last_pp = pp; done_m = -1;
    while (!done && m < MAXM - 1) begin
      if (mc_cnt == 0) begin
        m++;
        banks_ready = (m != 0) && ($urandom_range(9) < 5);   // at least one refusal
        if (m > 0) chk(since == MC && pp != last_pp, "pp toggles every machine cycle");
        since = 0; last_pp = pp;
      end
      since++;
      if (int'(mc_cnt) == HALF) begin
        if (launched < NM) begin
          if (banks_ready) lau[m] = 1;
          else stl[m] = 1;
        end
      end
      if (ld_re) begin ld[m]++; chk(int'(mc_cnt) > HALF, "SRAM reads after the launch check"); end
      if (core_start) begin cs[m]++; chk(mc_cnt == 0, "core_start at clock 0"); end
      if (ramp_start) begin rs[m]++; chk(mc_cnt == 0, "ramp_start at clock 0"); end
      if (xfer_we) begin xw[m]++; chk(int'(mc_cnt) >= 259, "transfer after the ramp"); end
      if (set_start) begin ss[m]++; chk(mc_cnt % 4 == 0, "set every 4 clocks"); end
      if (tx_valid) tx[m]++;
      @(negedge clk);
    end
    done_m = m;
    // expected schedule from the launches
    for (int i = 0; i <= done_m; i++) begin
      int e_ld, e_cs, e_rs, e_xw, e_ss, e_tx;
      e_ld = lau[i] ? n_rd : 0;
      if (mvm) begin
        e_cs = (i >= 1 && lau[i-1]) ? 1 : 0;
        e_rs = (i >= 2 && lau[i-2]) ? 1 : 0;
        e_xw = (i >= 2 && lau[i-2]) ? n_x : 0;
        e_ss = (i >= 3 && lau[i-3]) ? n_s : 0;
        e_tx = (i >= 4 && lau[i-4]) ? n_o : 0;
      end else begin
        e_cs = 0; e_rs = 0; e_xw = 0;
        e_ss = (i >= 1 && lau[i-1]) ? n_s : 0;
        e_tx = (i >= 2 && lau[i-2]) ? n_o : 0;
      end
      chk(ld[i] == e_ld, $sformatf("cycle %0d: %0d SRAM reads, expected %0d", i, ld[i], e_ld));
      chk(cs[i] == e_cs && rs[i] == e_rs, $sformatf("cycle %0d: core/ramp starts", i));
      chk(xw[i] == e_xw, $sformatf("cycle %0d: %0d transfers, expected %0d", i, xw[i], e_xw));
      chk(ss[i] == e_ss, $sformatf("cycle %0d: %0d ALU sets, expected %0d", i, ss[i], e_ss));
      chk(tx[i] == e_tx, $sformatf("cycle %0d: %0d output words, expected %0d", i, tx[i], e_tx));
      nl += lau[i];
      nst += stl[i];
    end
    chk(nl == NM, $sformatf("%0d launches", nl));
    chk(int'(stall_cnt) == nst && nst > 0, $sformatf("stall_cnt %0d, refused cycles %0d", stall_cnt, nst));
    chk(done, "done");
  endtask

  initial begin
    cfg = '0;
    out_bytes = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    layer(1'b1);
    layer(1'b1);
    layer(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
