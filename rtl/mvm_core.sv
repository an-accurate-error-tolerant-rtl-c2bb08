// mvm_core: one analog matrix-vector-multiply core: a ROWS x COLS signed
// 8-bit weight matrix stored in a SONOS array (two cells per weight), its
// row periphery, one integrator and one ramp-ADC column per bit-line pair.
//
// Operation: the 8-bit inputs x (read in parallel from the core's MVMin
// buffer) are applied one bit at a time by row_periph under control of
// core_ctrl; every bit-line pair integrates its difference current and
// accumulates the bits by halving (SIR), so the held voltage is proportional
// to sum_r W[r][c] * x[r]. The scaled result goes to the analog pipeline
// buffer selected by pp. During the following machine cycle (pp toggled) the
// shared ramp (midpt / ramp_on / code / ramp_lvl from ramp_generator)
// converts every column in parallel into q[c], while the next MVM can already
// integrate into the other buffer.
//
// Interface: start pulses an MVM (97 clocks, done on the next clock).
// prog_we writes one weight row; gain_we writes the gain code of one column's
// scaling amplifier (calibration). Unused rows (>= n_rows) are gated off.
// The structure follows the design; the integer voltage scale of the
// behavioural analog parts is this implementation's.
module mvm_core #(
  parameter int unsigned ROWS      = sonos_pkg::ROWS,
  parameter int unsigned COLS      = sonos_pkg::COLS,
  parameter int unsigned T_INT     = sonos_pkg::T_INT,
  localparam int unsigned IW       = $clog2(ROWS*127+1)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // inputs and mode
  input  logic [sonos_pkg::IN_BITS-1:0]           x [ROWS],
  input  logic                         signed_in,
  input  logic [$clog2(ROWS+1)-1:0]    n_rows,
  input  logic                         start,
  input  logic                         pp,
  output logic                         busy,
  output logic                         done,
  // weight programming
  input  logic                         prog_we,
  input  logic [$clog2(ROWS)-1:0]      prog_row,
  input  logic signed [7:0]            prog_w [COLS],
  // gain calibration
  input  logic                         gain_we,
  input  logic [$clog2(COLS)-1:0]      gain_col,
  input  logic [sonos_pkg::GAIN_BITS-1:0]         gain_code,
  // shared ramp
  input  logic                         midpt,
  input  logic                         ramp_on,
  input  logic [sonos_pkg::ADC_BITS-1:0]          code,
  input  logic signed [sonos_pkg::ADC_BITS:0]     ramp_lvl,
  // ADC results
  output logic [sonos_pkg::ADC_BITS-1:0]          q [COLS]
);

  logic [ROWS-1:0]               sg;
  logic                          drive, rst_int, int_en, div_en, out_en;
  logic [$clog2(sonos_pkg::IN_BITS)-1:0]    bit_sel;
  logic [IW-1:0]                 i_pos [COLS];
  logic [IW-1:0]                 i_neg [COLS];

  core_ctrl #(.IN_BITS(sonos_pkg::IN_BITS), .T_INT(T_INT)) u_ctrl (
    .clk, .rst_n, .start, .drive, .bit_sel, .rst_int, .int_en, .div_en,
    .out_en, .busy, .done
  );

  row_periph #(.ROWS(ROWS), .IN_BITS(sonos_pkg::IN_BITS)) u_rows (
    .x, .signed_in, .bit_sel, .drive, .n_rows, .sg
  );

  sonos_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk, .sg, .prog_we, .prog_row, .prog_w, .i_pos, .i_neg
  );

  for (genvar c = 0; c < COLS; c++) begin : g_col
    logic signed [sonos_pkg::V_BITS-1:0] v;

    bl_integrator #(.IW(IW)) u_int (
      .clk, .rst_n,
      .i_pos(i_pos[c]), .i_neg(i_neg[c]),
      .rst_int, .int_en, .div_en, .out_en, .pp,
      .gain_we(gain_we && (int'(gain_col) == c)), .gain_code,
      .vout(v)
    );

    adc_column u_adc (
      .clk, .rst_n, .vin(v), .midpt, .ramp_on, .code, .ramp_lvl,
      .q(q[c]), .n_on(), .p_on()
    );
  end

endmodule
