// tb_act_sram: checks the activation SRAM (banks as circular queues). Each
// bank gets an independent random write/read stream; the test checks the
// one-clock read data, per-bank occupancy, wr_ok dropping when a bank is
// full, wrap-around of the pointers, and that banks do not disturb each other.
// Runs at 4 banks of 8 bytes (the tile uses 32 of 2048); the circular-queue use of a bank is this implementation's choice.
module tb_act_sram;
  localparam int NB = 4, D = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [NB-1:0] we, re, wr_ok;
  logic [7:0] wdata [NB], rdata [NB];
  logic [3:0] occ [NB];
  always #1 clk = ~clk;

  act_sram #(.N_BANKS(NB), .BANK_DEPTH(D)) dut (.clk, .rst_n, .we, .wdata, .wr_ok, .re, .rdata, .occ);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 8) $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mq [NB][$];
  int exp_rd [NB];
  bit rd_pend [NB];
  initial begin
    int full_seen = 0;
    we = '0; re = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int b = 0; b < NB; b++) begin
        int bias;
        if (rd_pend[b]) chk(int'(rdata[b]) == exp_rd[b], $sformatf("bank %0d read %0d exp %0d", b, rdata[b], exp_rd[b]));
        chk(int'(occ[b]) == mq[b].size(), $sformatf("bank %0d occ", b));
        chk(wr_ok[b] == (mq[b].size() < D), "wr_ok");
        if (mq[b].size() == D) full_seen++;
        bias = ((t + 97*b) / 300) % 2 == 0 ? 3 : 1;
        we[b] = ($urandom_range(3) < bias);
        wdata[b] = 8'($urandom);
        re[b] = (mq[b].size() > 0) && ($urandom_range(3) >= bias);
      end
    end
    chk(full_seen > 0, "a bank reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int b = 0; b < NB; b++) begin
      bit ok;
      ok = mq[b].size() < D;
      rd_pend[b] = re[b];
      if (re[b]) exp_rd[b] = mq[b].pop_front();
      if (we[b] && ok) mq[b].push_back(int'(wdata[b]));
    end
  end
endmodule
