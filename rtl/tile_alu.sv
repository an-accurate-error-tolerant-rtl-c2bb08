// tile_alu: the tile's digital arithmetic unit: adders that combine the
// cores' results and add biases, ReLU, rescaling to 8 bits, and 2x2 max or
// average pooling.
//
// Operands: one ALU set is 16 lanes from each of the four ALUin buffers (64
// bytes), latched on set_start. ADC results are offset-binary codes (code -
// 128 is the signed value, adc_operands = 1); other operands are unsigned
// 8-bit activations.
//
// Adders (16 lanes of each kind, used over the 4 clocks of a set): in clock
// j = 0..3 of a set the group that starts at core j, if there is one, is
// reduced and its bias bias[256*j + 16*set + lane] is added:
//   ALU_SUM4: group {0,1,2,3} at j=0 (two 8-bit adders, a 9-bit adder, the
//             12-bit bias adder);
//   ALU_SUM2: groups {0,1} at j=0 and {2,3} at j=2 (8-bit adders, then the
//             bias adder): also the element-wise addition of two tensors;
//   ALU_NONE: every core at its own j, the operand bypasses the adders and
//             only the bias is added.
// Sums reach at most 13 bits. After the four clocks, for all 64 lanes: ReLU
// (relu_en), then rescaling y = floor(x * scale / 2^shift) saturated to
// 0..255 (after ReLU) or -128..127 (two's complement byte), then optional
// pooling of lane l over the four cores (lanes l, 16+l, 32+l, 48+l): the
// maximum, or the floor of the mean.
//
// Output: out_valid one clock after the fourth adder clock (6 clocks after
// set_start); out_n bytes of out_data are valid: 64 (NONE), 32 (SUM2), 16
// (SUM4 or pooled), packed group by group. A new set may start every 4
// clocks. The unit list follows the tile; the per-clock sharing of the
// adders, the bias indexing, the packing and the rounding are this
// implementation's choices.
module tile_alu
  import sonos_pkg::alu_mode_e, sonos_pkg::pool_e;
#(
  parameter int unsigned LANES = sonos_pkg::ALU_LANES,
  parameter int unsigned BW    = sonos_pkg::BIAS_BITS,
  parameter int unsigned NSETS = sonos_pkg::COLS / sonos_pkg::ALU_LANES
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // configuration (static during a layer)
  input  alu_mode_e                          alu_mode,
  input  logic                               bias_en,
  input  logic                               relu_en,
  input  logic                               adc_operands,
  input  pool_e                              pool,
  input  logic [7:0]                         scale,
  input  logic [4:0]                         shift,
  // one set of operands
  input  logic                               set_start,
  input  logic [$clog2(NSETS)-1:0]           set_idx,
  input  logic [7:0]                         opnd [4][LANES],
  // bias memory read port
  output logic [1:0]                         bias_core,
  output logic [$clog2(NSETS)-1:0]           bias_set,
  input  logic signed [BW-1:0]               bias [LANES],
  // results
  output logic                               out_valid,
  output logic [$clog2(4*LANES+1)-1:0]       out_n,
  output logic [7:0]                         out_data [4*LANES],
  output logic                               busy
);

  localparam int unsigned SW = 14;   // internal signed width (results fit 13)

  logic signed [SW-1:0]        a    [4][LANES];   // latched, sign-converted
  logic signed [SW-1:0]        res  [4][LANES];   // adder results per group
  logic [3:0]                  gvalid;
  logic [$clog2(NSETS)-1:0]    set_q;
  logic [1:0]                  j;
  logic                        run, fin;

  // ---- group of clock j --------------------------------------------------
  logic                        gstart;
  always_comb begin
    unique case (alu_mode)
      sonos_pkg::ALU_SUM4: gstart = (j == 2'd0);
      sonos_pkg::ALU_SUM2: gstart = (j == 2'd0) || (j == 2'd2);
      default:             gstart = 1'b1;
    endcase
  end

  logic signed [SW-1:0] gsum [LANES];
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic signed [SW-1:0] s01, s23, s;
      s01 = a[0][l] + a[1][l];                       // 8-bit adders
      s23 = a[2][l] + a[3][l];                       // 8-bit adders
      unique case (alu_mode)
        sonos_pkg::ALU_SUM4: s = s01 + s23;          // 9-bit adders
        sonos_pkg::ALU_SUM2: s = (j == 2'd0) ? s01 : s23;
        default:             s = a[j][l];            // adders bypassed
      endcase
      gsum[l] = bias_en ? s + SW'(bias[l]) : s;      // 12-bit bias adders
    end
  end

  assign bias_core = j;
  assign bias_set  = set_q;
  assign busy      = run || fin;

  // groups that produce results in the current mode
  always_comb begin
    unique case (alu_mode)
      sonos_pkg::ALU_SUM4: gvalid = 4'b0001;
      sonos_pkg::ALU_SUM2: gvalid = 4'b0101;
      default:             gvalid = 4'b1111;
    endcase
  end

  // A set occupies the adders for clocks j = 0..3 after it is latched; the
  // next set may be latched on the clock of j = 3.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run    <= 1'b0;
      fin    <= 1'b0;
      j      <= '0;
      set_q  <= '0;
    end else begin
      fin <= 1'b0;
      if (run) begin
        if (gstart) begin
          for (int l = 0; l < LANES; l++) res[j][l] <= gsum[l];
        end
        j <= j + 1'b1;
        if (j == 2'd3) begin
          run <= 1'b0;
          fin <= 1'b1;
        end
      end
      if (set_start) begin
        run    <= 1'b1;
        j      <= '0;
        set_q  <= set_idx;
        for (int c = 0; c < 4; c++)
          for (int l = 0; l < LANES; l++)
            a[c][l] <= adc_operands ? SW'($signed({~opnd[c][l][7], opnd[c][l][6:0]}))
                                    : SW'($signed({1'b0, opnd[c][l]}));
      end
    end
  end

  // ---- ReLU, rescaling, pooling -------------------------------------------
  function automatic logic [7:0] rescale(input logic signed [SW-1:0] x,
                                         input logic relu, input logic [7:0] sc,
                                         input logic [4:0] sh);
    logic signed [SW-1:0]   r;
    logic signed [SW+9:0]   p;
    r = (relu && x < 0) ? '0 : x;
    p = ((SW+10)'(r) * $signed({1'b0, sc})) >>> sh;
    if (relu) return (p > 255) ? 8'd255 : p[7:0];
    else if (p > 127)  return 8'h7f;
    else if (p < -128) return 8'h80;
    else               return p[7:0];
  endfunction

  logic [7:0] y [4][LANES];
  always_comb begin
    for (int g = 0; g < 4; g++)
      for (int l = 0; l < LANES; l++)
        y[g][l] = rescale(res[g][l], relu_en, scale, shift);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_n     <= '0;
    end else begin
      out_valid <= fin;
      if (fin) begin
        int n;
        n = 0;
        for (int i = 0; i < 4*LANES; i++) out_data[i] <= '0;
        if (pool != sonos_pkg::POOL_OFF) begin
          for (int l = 0; l < LANES; l++) begin
            logic signed [9:0] v [4];
            logic signed [9:0] m;
            logic signed [11:0] s;
            for (int g = 0; g < 4; g++)
              v[g] = relu_en ? $signed({2'b00, y[g][l]}) : 10'(signed'(y[g][l]));
            m = v[0];
            s = 12'(v[0]);
            for (int g = 1; g < 4; g++) begin
              if (v[g] > m) m = v[g];                 // magnitude comparators
              s = s + 12'(v[g]);                      // adder tree
            end
            out_data[l] <= (pool == sonos_pkg::POOL_MAX) ? m[7:0] : 8'(s >>> 2);
          end
          n = LANES;
        end else begin
          for (int g = 0; g < 4; g++) begin
            if (gvalid[g]) begin
              for (int l = 0; l < LANES; l++) out_data[n + l] <= y[g][l];
              n = n + LANES;
            end
          end
        end
        out_n <= ($clog2(4*LANES+1))'(n);
      end
    end
  end

endmodule
