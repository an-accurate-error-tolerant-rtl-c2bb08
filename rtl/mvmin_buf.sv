// mvmin_buf: the input buffer of one MVM core (1152 bytes, 1.125 kB). During
// the second half of a machine cycle it is filled from the SRAM, LOAD bytes
// per clock at byte index LOAD*widx; during the first half of the next
// machine cycle the core reads all bytes in parallel (x). Reset clears it.
module mvmin_buf #(
  parameter int unsigned BYTES = sonos_pkg::MVMIN_BYTES,
  parameter int unsigned LOAD  = sonos_pkg::LOAD_BYTES
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             we,
  input  logic [$clog2(BYTES/LOAD)-1:0]    widx,
  input  logic [7:0]                       wdata [LOAD],
  output logic [7:0]                       x [BYTES]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < BYTES; i++) x[i] <= '0;
    end else if (we) begin
      for (int i = 0; i < LOAD; i++) x[int'(widx)*LOAD + i] <= wdata[i];
    end
  end

endmodule
