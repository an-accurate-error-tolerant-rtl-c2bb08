// tb_mvm_core: one small core (16 rows x 4 columns) with the shared ramp
// generator. Programs random weights and gains, runs MVMs with random 8-bit
// inputs (unsigned, unsigned with rows gated by n_rows, and signed inputs on
// differential row pairs W / -W), converts them with the ramp ADC in the
// next "machine cycle" (pp toggled) and checks every column code against
//   code = clamp(floor(20 * S * gain / 2^24) + 128, 0, 255),
//   S = sum_r x[r] * W[r][c]
// (the SIR scale: 10 clocks x 2^8 per bit, halved 7 times). Also checks
// that a second MVM integrating into the other buffer does not disturb the
// value being converted.
// SIR and the ramp ADC follow the design; the voltage scale is this implementation's choice.
module tb_mvm_core;
  import sonos_pkg::*;
  localparam int R = 16, C = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, pp = 0, signed_in = 0, busy, done;
  logic [7:0] x [R];
  logic [4:0] n_rows;
  logic prog_we = 0, gain_we = 0;
  logic [3:0] prog_row;
  logic signed [7:0] prog_w [C];
  logic [1:0] gain_col;
  logic [GAIN_BITS-1:0] gain_code;
  logic rstart = 0, midpt, ramp_on, rdone, rbusy;
  logic [7:0] code, q [C];
  logic signed [8:0] ramp_lvl;
  int w [R][C], g [C];
  always #5 clk = ~clk;

  mvm_core #(.ROWS(R), .COLS(C)) dut (.clk, .rst_n, .x, .signed_in, .n_rows, .start, .pp, .busy, .done,
    .prog_we, .prog_row, .prog_w, .gain_we, .gain_col, .gain_code, .midpt, .ramp_on, .code, .ramp_lvl, .q);
  ramp_generator u_ramp (.clk, .rst_n, .start(rstart), .midpt, .ramp_on, .code, .ramp_lvl, .done(rdone), .busy(rbusy));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_weights(bit pairs);
    for (int r = 0; r < R; r++) begin
      @(negedge clk);
      prog_we = 1; prog_row = 4'(r);
      for (int c = 0; c < C; c++) begin
        if (pairs && r % 2 == 1) w[r][c] = -w[r-1][c];
        else w[r][c] = $urandom_range(254) - 127;
        prog_w[c] = 8'(w[r][c]);
      end
    end
    @(negedge clk); prog_we = 0;
  endtask

  task automatic mvm(output int exp_code [C]);
    for (int c = 0; c < C; c++) begin
      longint s, v;
      s = 0;
      for (int r = 0; r < R; r++) begin
        if (r >= n_rows) continue;
        if (!signed_in) s += longint'(x[r]) * w[r][c];
        else if (r % 2 == 0) s += (x[r][7] ? -longint'(x[r][6:0]) : longint'(x[r][6:0])) * w[r][c];
      end
      v = ((20 * s * g[c]) >>> 24) + 128;
      exp_code[c] = v < 0 ? 0 : v > 255 ? 255 : int'(v);
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    int e [C], e2 [C];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int mode = 0; mode < 3; mode++) begin
      signed_in = (mode == 2);
      load_weights(mode == 2);
      for (int it = 0; it < 40; it++) begin
        for (int c = 0; c < C; c++) begin
          @(negedge clk);
          gain_we = 1; gain_col = 2'(c);
          g[c] = (it % 8 == 0) ? 60000 : $urandom_range(100, 3000);
          gain_code = GAIN_BITS'(g[c]);
        end
        @(negedge clk); gain_we = 0;
        n_rows = (mode == 1) ? 5'($urandom_range(1, R - 1)) : 5'(R);
        foreach (x[r]) x[r] = (signed_in && r % 2 == 1) ? 8'd0 : 8'($urandom);
        mvm(e);
        // next machine cycle: convert e while the next MVM integrates
        @(negedge clk);
        pp = ~pp;
        rstart = 1;
        @(negedge clk); rstart = 0;
        foreach (x[r]) x[r] = (signed_in && r % 2 == 1) ? 8'd0 : 8'($urandom);
        mvm(e2);
        while (!rdone) @(negedge clk);
        @(negedge clk);
        for (int c = 0; c < C; c++) begin
          checks++;
          if (int'(q[c]) != e[c]) begin
            failures++;
            if (failures < 6) $display("FAIL: mode %0d col %0d q %0d exp %0d", mode, c, q[c], e[c]);
          end
        end
        // convert the second result too
        pp = ~pp;
        rstart = 1;
        @(negedge clk); rstart = 0;
        while (!rdone) @(negedge clk);
        @(negedge clk);
        for (int c = 0; c < C; c++) begin
          checks++;
          if (int'(q[c]) != e2[c]) begin
            failures++;
            if (failures < 6) $display("FAIL: mode %0d col %0d second q %0d exp %0d", mode, c, q[c], e2[c]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
