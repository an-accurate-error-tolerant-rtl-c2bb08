// bias_mem: the tile's bias memory (1024 x 12 bits = 1.5 kB): one signed bias
// per output column of each of the four cores, index = 256*core + column.
// Biases are kept and added digitally because their range differs from the
// weights in the array. Written one entry per clock; read LANES consecutive
// entries (one ALU set, 16 x 12 = 192 bits) combinationally at index
// LANES*ridx.
module bias_mem #(
  parameter int unsigned DEPTH = sonos_pkg::BIAS_DEPTH,
  parameter int unsigned BW    = sonos_pkg::BIAS_BITS,
  parameter int unsigned LANES = sonos_pkg::ALU_LANES
) (
  input  logic                            clk,
  input  logic                            we,
  input  logic [$clog2(DEPTH)-1:0]        widx,
  input  logic signed [BW-1:0]            wdata,
  input  logic [$clog2(DEPTH/LANES)-1:0]  ridx,
  output logic signed [BW-1:0]            rdata [LANES]
);

  logic signed [BW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[widx] <= wdata;
  end

  always_comb begin
    for (int i = 0; i < LANES; i++) rdata[i] = mem[int'(ridx)*LANES + i];
  end

endmodule
