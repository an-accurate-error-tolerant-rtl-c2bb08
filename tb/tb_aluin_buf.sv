// tb_aluin_buf: checks the double buffering: writes go to half pp, reads
// (RD bytes at RD*ridx) come from half ~pp, and a half written in one
// "machine cycle" is read back intact after pp toggles while the other half
// is being rewritten.
// Runs at 64 bytes per half (the tile uses 1 kB).
module tb_aluin_buf;
  localparam int B = 64, L = 8, RD = 16;
  int checks = 0, failures = 0;
  logic clk = 0, pp = 0, we = 0;
  logic [2:0] widx;
  logic [1:0] ridx;
  logic [7:0] wdata [L], rdata [RD];
  always #5 clk = ~clk;

  aluin_buf #(.BYTES(B), .LOAD(L), .RD(RD)) dut (.clk, .pp, .we, .widx, .wdata, .ridx, .rdata);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m [2][B];
    for (int cyc = 0; cyc < 20; cyc++) begin
      // fill the write half completely, in random group order, while reading the other
      int order [8];
      foreach (order[i]) order[i] = i;
      order.shuffle();
      for (int g = 0; g < 8; g++) begin
        @(negedge clk);
        we = 1; widx = 3'(order[g]);
        foreach (wdata[k]) wdata[k] = 8'($urandom);
        for (int k = 0; k < L; k++) m[pp][order[g]*L + k] = int'(wdata[k]);
        ridx = 2'(g % 4);
        #1;
        if (cyc > 0)
          for (int k = 0; k < RD; k++) begin
            checks++;
            if (int'(rdata[k]) != m[~pp][int'(ridx)*RD + k]) begin
              failures++;
              if (failures < 8) $display("FAIL: cyc %0d read half %0d byte %0d", cyc, !pp, int'(ridx)*RD + k);
            end
          end
      end
      @(negedge clk);
      we = 0;
      pp = ~pp;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
