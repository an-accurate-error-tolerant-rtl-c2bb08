// tb_tile_alu: random sets through the ALU in every mode (NONE, SUM2, SUM4),
// with and without bias, ReLU, ADC or activation operands, max and average
// pooling, against an integer reference model of sum + bias, ReLU,
// floor(x * scale / 2^shift) with saturation, and pooling. Sets are issued
// back to back every 4 clocks as well as spaced out; the test checks out_n,
// the packing of the results and out_valid 6 clocks after the edge that
// latches set_start.
// The unit list follows the design; the reference shares this implementation's choices of rounding, saturation and packing.
module tb_tile_alu;
  import sonos_pkg::*;
  localparam int LN = 16, NS = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  alu_mode_e alu_mode;
  pool_e pool;
  logic bias_en, relu_en, adc_operands, set_start = 0, out_valid, busy;
  logic [7:0] scale;
  logic [4:0] shift;
  logic [1:0] set_idx, bias_set;
  logic [1:0] bias_core;
  logic [7:0] opnd [4][LN];
  logic signed [11:0] bias [LN];
  logic [6:0] out_n;
  logic [7:0] out_data [4*LN];
  int bmem [4][NS][LN];
  always #5 clk = ~clk;

  tile_alu #(.LANES(LN), .NSETS(NS)) dut (.clk, .rst_n, .alu_mode, .bias_en, .relu_en,
    .adc_operands, .pool, .scale, .shift, .set_start, .set_idx, .opnd, .bias_core,
    .bias_set, .bias, .out_valid, .out_n, .out_data, .busy);

  always_comb for (int l = 0; l < LN; l++) bias[l] = 12'(bmem[bias_core][bias_set][l]);

  function automatic int resc(int x, bit relu, int sc, int sh);
    longint p;
    if (relu && x < 0) x = 0;
    p = (longint'(x) * sc) >>> sh;
    if (relu) return p > 255 ? 255 : int'(p);
    if (p > 127) return 127;
    if (p < -128) return -128;
    return int'(p);
  endfunction

  int expq [$][$];
  int tstart [$];
  longint tnow = 0;
  always @(posedge clk) tnow++;

  task automatic issue();
    int a [4][LN], e [$], y [4][LN];
    bit gv [4];
    set_idx = 2'($urandom);
    foreach (opnd[c, l]) begin
      opnd[c][l] = 8'($urandom);
      a[c][l] = adc_operands ? int'(opnd[c][l]) - 128 : int'(opnd[c][l]);
    end
    for (int g = 0; g < 4; g++) begin
      gv[g] = (alu_mode == ALU_NONE) || (alu_mode == ALU_SUM2 && g % 2 == 0) || g == 0;
      for (int l = 0; l < LN; l++) begin
        int s;
        case (alu_mode)
          ALU_SUM4: s = a[0][l] + a[1][l] + a[2][l] + a[3][l];
          ALU_SUM2: s = a[g][l] + a[(g + 1) % 4][l];
          default:  s = a[g][l];
        endcase
        if (bias_en) s += bmem[g][set_idx][l];
        y[g][l] = resc(s, relu_en, scale, shift);
      end
    end
    if (pool != POOL_OFF) begin
      for (int l = 0; l < LN; l++) begin
        int m, s;
        m = y[0][l]; s = 0;
        for (int g = 0; g < 4; g++) begin
          if (y[g][l] > m) m = y[g][l];
          s += y[g][l];
        end
        e.push_back(((pool == POOL_MAX) ? m : (s >>> 2)) & 255);
      end
    end else
      for (int g = 0; g < 4; g++) if (gv[g]) for (int l = 0; l < LN; l++) e.push_back(y[g][l] & 255);
    expq.push_back(e);
    tstart.push_back(int'(tnow));
    set_start = 1;
    @(negedge clk);
    set_start = 0;
  endtask

  always @(posedge clk) if (out_valid) begin
    int e [$];
    #1;
    checks++;
    if (expq.size() == 0) begin failures++; $display("FAIL: unexpected output"); end
    else begin
      int bad;
      bad = 0;
      e = expq.pop_front();
      if (int'(out_n) != e.size()) bad++;
      foreach (e[i]) if (int'(out_data[i]) != e[i]) begin
        if (bad < 3) $display("FAIL: byte %0d got %0d exp %0d (mode %s pool %s)", i, out_data[i], e[i], alu_mode.name(), pool.name());
        bad++;
      end
      // tstart is taken one clock before the edge that latches set_start
      if (tnow - tstart[0] != 7 || int'(out_n) != e.size()) begin
        if (failures < 3) $display("FAIL: out_n %0d exp %0d, latency %0d", out_n, e.size(), tnow - tstart[0]);
        bad++;
      end
      void'(tstart.pop_front());
      if (bad) failures++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (bmem[c, s, l]) bmem[c][s][l] = $urandom_range(4095) - 2048;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 600; it++) begin
      alu_mode = alu_mode_e'($urandom_range(2));
      bias_en = 1'($urandom);
      relu_en = 1'($urandom);
      adc_operands = 1'($urandom);
      pool = (alu_mode == ALU_NONE) ? pool_e'($urandom_range(2)) : POOL_OFF;
      scale = 8'($urandom_range(1, 255));
      shift = 5'($urandom_range(0, 12));
      @(negedge clk);
      for (int b = 0; b < 4; b++) begin
        issue();                                  // back to back, every 4 clocks
        repeat (3) @(negedge clk);
      end
      repeat (10) @(negedge clk);
    end
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
