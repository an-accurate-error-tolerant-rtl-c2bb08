// tb_mvmin_buf: writes the input buffer in LOAD-byte groups in random order
// and checks that every byte appears at its row position and that groups not
// written keep their value; also checks the reset clears the buffer.
// Runs at 64 bytes (the tile uses 1152).
module tb_mvmin_buf;
  localparam int B = 64, L = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0;
  logic [2:0] widx;
  logic [7:0] wdata [L], x [B];
  always #1 clk = ~clk;

  mvmin_buf #(.BYTES(B), .LOAD(L)) dut (.clk, .rst_n, .we, .widx, .wdata, .x);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m [B];
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (m[i]) m[i] = 0;
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      foreach (m[i]) begin
        checks++;
        if (int'(x[i]) != m[i]) begin failures++; if (failures < 8) $display("FAIL: byte %0d = %0d exp %0d", i, x[i], m[i]); end
      end
      we = ($urandom_range(3) != 0);
      widx = 3'($urandom);
      foreach (wdata[k]) wdata[k] = 8'($urandom);
      if (we) for (int k = 0; k < L; k++) m[int'(widx)*L + k] = int'(wdata[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
