// tb_core_ctrl: checks the MVM phase sequence: one RESET clock, then for each
// input bit 0..7 ten clocks of row drive with int_en one clock later, a DIV
// clock between bits, an OUT clock, done 98 clocks after start; also that
// integration never overlaps drive changes and busy covers the sequence.
// The 10 integration clocks per bit follow the design; the one-clock RESET, DIV and OUT steps are this implementation's choice.
module tb_core_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic drive, rst_int, int_en, div_en, out_en, busy, done;
  logic [2:0] bit_sel;
  always #1 clk = ~clk;

  core_ctrl dut (.clk, .rst_n, .start, .drive, .bit_sel, .rst_int, .int_en,
                 .div_en, .out_en, .busy, .done);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, n_drive [8], n_int, n_div, n_out, n_rst, t_done;
    bit prev_drive;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 2; rep++) begin
      foreach (n_drive[k]) n_drive[k] = 0;
      n_int = 0; n_div = 0; n_out = 0; n_rst = 0; t_done = -1;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      prev_drive = 0;
      for (t = 1; t < 120; t++) begin
        if (drive) n_drive[bit_sel]++;
        if (int_en) n_int++;
        if (div_en) n_div++;
        if (out_en) n_out++;
        if (rst_int) begin n_rst++; chk(t == 1, "RESET on the first clock"); end
        chk(int_en == prev_drive, "int_en follows drive by one clock");
        if (div_en) chk(!drive && !int_en, "DIV alone");
        if (done && t_done < 0) t_done = t;
        prev_drive = drive;
        if (t < 97) chk(busy, "busy during sequence");
        @(negedge clk);
      end
      foreach (n_drive[k]) chk(n_drive[k] == 10, $sformatf("bit %0d driven 10 clocks (%0d)", k, n_drive[k]));
      chk(n_int == 80, "80 integration clocks");
      chk(n_div == 7, "7 DIV clocks");
      chk(n_out == 1, "1 OUT clock");
      chk(n_rst == 1, "1 RESET clock");
      chk(t_done == 98, $sformatf("done at clock 98 after start (%0d)", t_done));
      chk(!busy, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
