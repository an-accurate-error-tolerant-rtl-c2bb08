// tb_row_periph: checks the row periphery against an independent model of
// bit selection, signed steering (sign-magnitude input on the even port, W on
// the even row, -W on the odd row) and row gating, for random inputs.
// The steering rule follows the design; the sign-magnitude input format and the sizes are this implementation's choices.
module tb_row_periph;
  localparam int R = 16;
  int checks = 0, failures = 0;
  logic [7:0]      x [R];
  logic            signed_in, drive;
  logic [2:0]      bit_sel;
  logic [4:0]      n_rows;
  logic [R-1:0]    sg;

  row_periph #(.ROWS(R)) dut (.x, .signed_in, .bit_sel, .drive, .n_rows, .sg);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 400; it++) begin
      for (int r = 0; r < R; r++) x[r] = 8'($urandom);
      signed_in = 1'($urandom);
      drive     = ($urandom_range(7) != 0);
      bit_sel   = 3'($urandom);
      n_rows    = 5'($urandom_range(R));
      #1;
      for (int r = 0; r < R; r++) begin
        bit e;
        if (!drive || r >= n_rows) e = 0;
        else if (!signed_in) e = x[r][bit_sel];
        else if (bit_sel == 7) e = 0;
        else if (r % 2 == 0) e = x[r][bit_sel] & ~x[r][7];
        else e = x[r-1][bit_sel] & x[r-1][7];
        checks++;
        if (sg[r] !== e) begin
          failures++;
          if (failures < 5) $display("FAIL: row %0d sg=%0b exp %0b (signed=%0b bit=%0d)", r, sg[r], e, signed_in, bit_sel);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
