// tb_ramp_generator: checks the 2-clock MIDPT phase, the 256-step ramp with
// code counting 0..255 and level = code - 128, done after 258 clocks, and that
// a start during a conversion is ignored.
// The 256-step ramp and MIDPT phase follow the design; the 2-clock MIDPT length is this implementation's choice.
module tb_ramp_generator;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic midpt, ramp_on, done, busy;
  logic [7:0] code;
  logic signed [8:0] ramp_lvl;
  always #1 clk = ~clk;

  ramp_generator dut (.clk, .rst_n, .start, .midpt, .ramp_on, .code, .ramp_lvl, .done, .busy);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 8) $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nm, nr, tdone, expc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 2; rep++) begin
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      nm = 0; nr = 0; tdone = -1; expc = 0;
      for (int t = 1; t < 300; t++) begin
        if (t == 100) start = 1;      // ignored: conversion running
        if (t == 101) start = 0;
        if (midpt) begin nm++; chk(t <= 2, "MIDPT in the first 2 clocks"); end
        if (ramp_on) begin
          chk(int'(code) == expc, $sformatf("code %0d exp %0d", code, expc));
          chk(int'(ramp_lvl) == int'(code) - 128, "level = code - 128");
          expc++; nr++;
        end
        if (done && tdone < 0) tdone = t;
        @(negedge clk);
      end
      chk(nm == 2, "2 MIDPT clocks");
      chk(nr == 256, $sformatf("256 ramp steps (%0d)", nr));
      chk(tdone == 259, $sformatf("done 259 clocks after the start pulse (%0d)", tdone));
      chk(!busy, "idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
