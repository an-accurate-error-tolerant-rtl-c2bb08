// tb_adc_column: drives one ADC column with the real ramp generator and
// checks code = clamp(vin + 128, 0, 255) for random and edge voltages
// (both clipping ends, the midpoint), and that exactly one of the two ramp
// comparators is powered during the ramp, chosen by the midpoint latch.
// Midpoint latch, comparator gating and clipping follow the design; the offset-binary code is this implementation's choice.
module tb_adc_column;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic midpt, ramp_on, done, busy, n_on, p_on;
  logic [7:0] code, q;
  logic signed [8:0] ramp_lvl;
  logic signed [23:0] vin;
  always #1 clk = ~clk;

  ramp_generator u_ramp (.clk, .rst_n, .start, .midpt, .ramp_on, .code, .ramp_lvl, .done, .busy);
  adc_column dut (.clk, .rst_n, .vin, .midpt, .ramp_on, .code, .ramp_lvl, .q, .n_on, .p_on);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vals [$] = '{0, 1, -1, 127, 128, -128, -129, 5000, -5000, 64, -64};
    for (int i = 0; i < 60; i++) vals.push_back($urandom_range(600) - 300);
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (vals[i]) begin
      int e, bad_pwr;
      vin = 24'(vals[i]);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      bad_pwr = 0;
      while (!done) begin
        if (ramp_on && (n_on == p_on)) bad_pwr++;
        if (ramp_on && (n_on != (vals[i] > 0))) bad_pwr++;
        @(negedge clk);
      end
      @(negedge clk);
      e = vals[i] + 128;
      if (e < 0) e = 0;
      if (e > 255) e = 255;
      checks++;
      if (int'(q) != e) begin failures++; $display("FAIL: vin %0d q %0d exp %0d", vals[i], q, e); end
      checks++;
      if (bad_pwr != 0) begin failures++; $display("FAIL: comparator power gating for vin %0d", vals[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
