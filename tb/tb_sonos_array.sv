// tb_sonos_array: programs random signed weights (including -128, which maps
// to the largest level 127) into every row, then applies random select-gate
// patterns and checks both bit-line currents of every column against
// sum over selected rows of max(w,0) and max(-w,0). The currents are checked
// one clock after each pattern is applied. Reprogramming is repeated.
// Runs at 12 x 6 weights; the differential storage follows the design, the exact integer levels are this model's.
module tb_sonos_array;
  localparam int R = 12, C = 6, IW = $clog2(R*127+1);
  int checks = 0, failures = 0;
  logic clk = 0, prog_we = 0;
  logic [R-1:0] sg = '0;
  logic [3:0] prog_row;
  logic signed [7:0] prog_w [C];
  logic [IW-1:0] i_pos [C], i_neg [C];
  int w [R][C];
  always #5 clk = ~clk;

  sonos_array #(.ROWS(R), .COLS(C)) dut (.clk, .sg, .prog_we, .prog_row, .prog_w, .i_pos, .i_neg);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      sg = '0;
      for (int r = 0; r < R; r++) begin
        @(negedge clk);
        prog_we = 1; prog_row = 4'(r);
        for (int c = 0; c < C; c++) begin
          prog_w[c] = (r == 0 && c == 0) ? -8'sd128 : 8'($urandom);
          w[r][c] = int'(prog_w[c]);
        end
      end
      @(negedge clk);
      prog_we = 0;
      @(negedge clk);
      for (int it = 0; it < 200; it++) begin
        logic [R-1:0] nsg;
        do nsg = R'($urandom); while (nsg == sg);
        sg = nsg;
        @(negedge clk);
        for (int c = 0; c < C; c++) begin
          int ep, en;
          ep = 0; en = 0;
          for (int r = 0; r < R; r++) if (sg[r]) begin
            if (w[r][c] >= 0) ep += w[r][c];
            else en += (w[r][c] == -128) ? 127 : -w[r][c];
          end
          checks++;
          if (int'(i_pos[c]) != ep || int'(i_neg[c]) != en) begin
            failures++;
            if (failures < 6) $display("FAIL: col %0d i_pos %0d/%0d i_neg %0d/%0d", c, i_pos[c], ep, i_neg[c], en);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
