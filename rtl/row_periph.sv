// row_periph: input-bit selection and signed-input steering for the rows of
// one analog MVM core.
//
// Every row r holds an 8-bit input x[r]. During input bit k the row driver of
// row r is switched on when the selected bit is 1; the driver turns the logic
// level into the select-gate voltage that lets the SONOS cell conduct, so the
// output sg[r] is that select-gate enable.
//
// Unsigned inputs: sg[r] = x[r][k].
// Signed inputs use four cells per weight: the row pair (2i, 2i+1) stores W on
// the even row and -W on the odd row, and the input sits on the even port
// (the odd port is unused). The input MSB is the sign and bits 6:0 are the
// magnitude (sign-magnitude). The magnitude bit is steered to the even row for
// a positive input and to the odd row for a negative one; the sign bit itself
// is never applied, so in signed mode bit 7 drives no row.
// Rows at or above n_rows are gated off (peripherals of unused rows are off).
//
// Purely combinational. The steering follows the row periphery of the
// design; the sign-magnitude input format and the 3-bit bit select are
// choices of this implementation.
module row_periph #(
  parameter int unsigned ROWS    = sonos_pkg::ROWS,
  parameter int unsigned IN_BITS = sonos_pkg::IN_BITS
) (
  input  logic [IN_BITS-1:0]         x [ROWS],   // inputs from the MVMin buffer
  input  logic                       signed_in,  // signed-input mode
  input  logic [$clog2(IN_BITS)-1:0] bit_sel,    // input bit being integrated
  input  logic                       drive,      // row drivers on (INT phase)
  input  logic [$clog2(ROWS+1)-1:0]  n_rows,     // rows in use
  output logic [ROWS-1:0]            sg          // select-gate enables
);

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      logic own_bit, up_bit, up_neg, own_neg;
      own_bit = x[r][bit_sel];
      own_neg = x[r][IN_BITS-1];
      up_bit  = (r > 0) ? x[(r > 0) ? r-1 : 0][bit_sel]         : 1'b0;
      up_neg  = (r > 0) ? x[(r > 0) ? r-1 : 0][IN_BITS-1]       : 1'b0;
      if (!drive || (r >= int'(n_rows))) begin
        sg[r] = 1'b0;
      end else if (!signed_in) begin
        sg[r] = own_bit;
      end else if (int'(bit_sel) == IN_BITS-1) begin
        sg[r] = 1'b0;                       // sign bit is not integrated
      end else if ((r % 2) == 0) begin
        sg[r] = own_bit & ~own_neg;         // +W row: positive inputs
      end else begin
        sg[r] = up_bit & up_neg;            // -W row: negative inputs
      end
    end
  end

endmodule
