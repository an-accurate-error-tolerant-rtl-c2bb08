// tb_bias_mem: writes random signed 12-bit biases to every entry in random
// order, then reads every group of LANES entries and checks value and sign.
// Runs at 128 entries (the tile uses 1024).
module tb_bias_mem;
  localparam int D = 128, BW = 12, LN = 16;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [6:0] widx;
  logic signed [BW-1:0] wdata, rdata [LN];
  logic [2:0] ridx;
  always #5 clk = ~clk;

  bias_mem #(.DEPTH(D), .BW(BW), .LANES(LN)) dut (.clk, .we, .widx, .wdata, .ridx, .rdata);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m [D], order [D];
    for (int rep = 0; rep < 3; rep++) begin
      foreach (order[i]) order[i] = i;
      order.shuffle();
      foreach (order[i]) begin
        @(negedge clk);
        we = 1; widx = 7'(order[i]);
        wdata = (i == 0) ? -12'sd2048 : (i == 1) ? 12'sd2047 : BW'($urandom);
        m[order[i]] = int'(wdata);
      end
      @(negedge clk);
      we = 0;
      for (int g = 0; g < D / LN; g++) begin
        ridx = 3'(g);
        #1;
        for (int k = 0; k < LN; k++) begin
          checks++;
          if (int'(rdata[k]) != m[g*LN + k]) begin
            failures++;
            if (failures < 8) $display("FAIL: entry %0d = %0d exp %0d", g*LN + k, rdata[k], m[g*LN + k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
