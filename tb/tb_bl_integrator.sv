// tb_bl_integrator: random sequences of RESET, INT, DIV and OUT with random
// currents and gains against an integer model of the charge:
//   acc += (i_pos - i_neg) * 2^ACC_FRAC on INT, acc >>= 1 (floor) on DIV,
//   vout[pp] = sat(floor(acc * gain / 2^(GAIN_SHIFT + ACC_FRAC))) on OUT,
// checking the held value from the other half (double buffer) and saturation.
// Integrate-and-halve follows the design; the integer scale and gain code are this implementation's choices.
module tb_bl_integrator;
  import sonos_pkg::*;
  localparam int IW = 20;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, rst_int = 0, int_en = 0, div_en = 0, out_en = 0, pp = 0, gain_we = 0;
  logic [IW-1:0] i_pos = '0, i_neg = '0;
  logic [GAIN_BITS-1:0] gain_code;
  logic signed [V_BITS-1:0] vout;
  always #5 clk = ~clk;

  bl_integrator #(.IW(IW)) dut (.clk, .rst_n, .i_pos, .i_neg, .rst_int, .int_en, .div_en,
                                .out_en, .pp, .gain_we, .gain_code, .vout);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc, g, held [2];
    longint vmax = (longint'(1) <<< (V_BITS-1)) - 1;
    int nsat = 0;
    held[0] = 0; held[1] = 0; acc = 0; g = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 20000; it++) begin
      int op;
      @(negedge clk);
      checks++;
      if (longint'(vout) != held[!pp]) begin
        failures++;
        if (failures < 6) $display("FAIL: vout %0d exp %0d", vout, held[!pp]);
      end
      rst_int = 0; int_en = 0; div_en = 0; out_en = 0; gain_we = 0;
      op = $urandom_range(99);
      i_pos = IW'($urandom); i_neg = IW'($urandom);
      if (it % 4000 < 1000) i_neg = i_neg >> 3;        // drift up: positive clipping
      else if (it % 4000 < 2000) i_pos = i_pos >> 3;   // drift down: negative clipping
      if (op < 3) begin rst_int = 1; acc = 0; end
      else if (op < 60) begin int_en = 1; acc += (longint'(i_pos) - longint'(i_neg)) <<< ACC_FRAC; end
      else if (op < 75) begin div_en = 1; acc = acc >>> 1; end
      else if (op < 85) begin
        longint v;
        out_en = 1;
        v = (acc * g) >>> (GAIN_SHIFT + ACC_FRAC);
        if (v > vmax) begin v = vmax; nsat++; end
        if (v < -vmax - 1) begin v = -vmax - 1; nsat++; end
        held[pp] = v;
      end else if (op < 90) begin gain_we = 1; gain_code = GAIN_BITS'($urandom); g = gain_code; end
      else if (op < 95) pp = ~pp;
    end
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
