// sonos_array: behavioural model of the SONOS analog memory array of one MVM
// core (ROWS x 2*COLS cells). This is not synthesizable hardware: it stands
// for an analog array of charge-trap cells and models it with integers.
//
// Each weight W[r][c] is a signed 8-bit value held by a differential cell
// pair: the magnitude (7 bits, 0..127) is stored in the positive cell for
// W > 0 and in the negative cell for W < 0, the other cell sits in the
// minimum-current state (level 0). A cell level is its read current in units
// of the current step between two adjacent of the 128 levels.
//
// An MVM applies one input bit at a time: a row whose select gate sg[r] is on
// conducts, the cell currents add on the bit lines (Kirchhoff), and the two
// bit lines of each pair report their total currents i_pos[c] and i_neg[c].
// The model is ideal: no programming error, read noise, drift or IR drop.
// The currents are re-evaluated on the clock edge after sg changes, so they
// lag the select gates by one clock. The cells have no reset: they are
// non-volatile and hold whatever was last programmed.
//
// Programming: with prog_we high, row prog_row is written with the 256
// signed weights prog_w (one row per clock, the row-at-a-time programming of
// the design). Weight range -127..127; -128 is stored as -127.
module sonos_array #(
  parameter int unsigned ROWS = sonos_pkg::ROWS,
  parameter int unsigned COLS = sonos_pkg::COLS,
  localparam int unsigned IW  = $clog2(ROWS*127+1)   // bit-line current width
) (
  input  logic                      clk,
  input  logic [ROWS-1:0]           sg,          // select gates (row drivers)
  input  logic                      prog_we,
  input  logic [$clog2(ROWS)-1:0]   prog_row,
  input  logic signed [7:0]         prog_w [COLS],
  output logic [IW-1:0]             i_pos [COLS], // current of BL+
  output logic [IW-1:0]             i_neg [COLS]  // current of BL-
);

  logic [6:0]       lvl_pos [ROWS][COLS];
  logic [6:0]       lvl_neg [ROWS][COLS];
  logic [ROWS-1:0]  sg_q;

  // programming (write-verify is abstracted to an exact write)
  always_ff @(posedge clk) begin
    if (prog_we) begin
      for (int c = 0; c < COLS; c++) begin
        if (prog_w[c] >= 0) begin
          lvl_pos[prog_row][c] <= prog_w[c][6:0];
          lvl_neg[prog_row][c] <= '0;
        end else begin
          lvl_pos[prog_row][c] <= '0;
          lvl_neg[prog_row][c] <= (prog_w[c] == -8'sd128) ? 7'd127 : 7'(-prog_w[c]);
        end
      end
    end
  end

  // bit-line currents, evaluated when the applied input bits change
  always_ff @(posedge clk) begin
    sg_q <= sg;
    if (sg != sg_q) begin
      for (int c = 0; c < COLS; c++) begin
        logic [IW-1:0] sp, sn;
        sp = '0;
        sn = '0;
        for (int r = 0; r < ROWS; r++) begin
          if (sg[r]) begin
            sp = sp + IW'(lvl_pos[r][c]);
            sn = sn + IW'(lvl_neg[r][c]);
          end
        end
        i_pos[c] <= sp;
        i_neg[c] <= sn;
      end
    end
  end

endmodule
