// aluin_buf: the double-buffered ALU input buffer of one core (2 x 1 kB).
//
// In a machine cycle one half (selected by pp) is filled, LOAD bytes per
// clock at byte index LOAD*widx, by the ADC result transfer (MVM tile) or
// straight from the SRAM (non-MVM tile), while the ALU reads the other half,
// RD bytes at byte index RD*ridx (combinational read). pp toggles every
// machine cycle, so what one stage writes the next stage reads. The buffer
// has no reset: every byte read has been written in the previous cycle.
module aluin_buf #(
  parameter int unsigned BYTES = sonos_pkg::ALUIN_BYTES,
  parameter int unsigned LOAD  = sonos_pkg::LOAD_BYTES,
  parameter int unsigned RD    = sonos_pkg::ALU_LANES
) (
  input  logic                          clk,
  input  logic                          pp,
  input  logic                          we,
  input  logic [$clog2(BYTES/LOAD)-1:0] widx,
  input  logic [7:0]                    wdata [LOAD],
  input  logic [$clog2(BYTES/RD)-1:0]   ridx,
  output logic [7:0]                    rdata [RD]
);

  logic [7:0] mem [2][BYTES];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int i = 0; i < LOAD; i++) mem[pp][int'(widx)*LOAD + i] <= wdata[i];
    end
  end

  always_comb begin
    for (int i = 0; i < RD; i++) rdata[i] = mem[~pp][int'(ridx)*RD + i];
  end

endmodule
