// tb_tileout_buf: checks that ALU results appended in n-byte pieces (16, 32
// or 64) to half pp are packed back to back from byte 0 after wclr, that
// rcount of the other half reports the bytes held, and that 32-byte words
// read from half ~pp after the toggle carry the bytes in order.
// Runs at 256 bytes per half (the tile uses 2 kB).
module tb_tileout_buf;
  localparam int B = 256, WM = 64, RD = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, pp = 0, wclr = 0, we = 0;
  logic [6:0] wn;
  logic [7:0] wdata [WM], rdata [RD];
  logic [2:0] ridx;
  logic [8:0] rcount;
  always #5 clk = ~clk;

  tileout_buf #(.BYTES(B), .WMAX(WM), .RD(RD)) dut (.clk, .rst_n, .pp, .wclr, .we, .wn, .wdata, .ridx, .rdata, .rcount);

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

  initial begin
    int m [$], prev [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 30; cyc++) begin
      int nwr;
      @(negedge clk); wclr = 1;
      @(negedge clk); wclr = 0;
      m.delete();
      nwr = $urandom_range(1, 4);
      for (int w = 0; w < nwr; w++) begin
        int n;
        n = 16 << $urandom_range(0, 2);
        we = 1; wn = 7'(n);
        foreach (wdata[k]) wdata[k] = 8'($urandom);
        for (int k = 0; k < n; k++) m.push_back(int'(wdata[k]));
        // meanwhile the other half is read out
        if (cyc > 0 && w < (prev.size() + RD - 1) / RD) begin
          ridx = 3'(w);
          #1;
          for (int k = 0; k < RD && w*RD + k < prev.size(); k++)
            chk(int'(rdata[k]) == prev[w*RD + k], $sformatf("cyc %0d word %0d byte %0d", cyc, w, k));
        end
        @(negedge clk);
      end
      we = 0;
      @(negedge clk);
      pp = ~pp;
      #1;
      chk(int'(rcount) == m.size(), $sformatf("rcount %0d exp %0d", rcount, m.size()));
      // read everything just written
      for (int w = 0; w < (m.size() + RD - 1) / RD; w++) begin
        ridx = 3'(w);
        #1;
        for (int k = 0; k < RD && w*RD + k < m.size(); k++)
          chk(int'(rdata[k]) == m[w*RD + k], $sformatf("cyc %0d readback word %0d byte %0d", cyc, w, k));
      end
      prev = m;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
