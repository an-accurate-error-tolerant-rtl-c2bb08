// act_sram: the tile's activation memory, N_BANKS banks of BANK_DEPTH bytes
// (64 kB with the defaults). Bank b is written only by receive FIFO b and
// read in parallel with the other banks, so 32 activations move per clock in
// each direction. Each bank is a circular queue (sram_bank): data is kept
// until it is read once. All bank ports are brought out; rdata follows re by
// one clock.
module act_sram #(
  parameter int unsigned N_BANKS    = sonos_pkg::N_BANKS,
  parameter int unsigned BANK_DEPTH = sonos_pkg::BANK_DEPTH
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [N_BANKS-1:0]              we,
  input  logic [7:0]                      wdata [N_BANKS],
  output logic [N_BANKS-1:0]              wr_ok,
  input  logic [N_BANKS-1:0]              re,
  output logic [7:0]                      rdata [N_BANKS],
  output logic [$clog2(BANK_DEPTH+1)-1:0] occ   [N_BANKS]
);

  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    sram_bank #(.DEPTH(BANK_DEPTH)) u_bank (
      .clk, .rst_n, .we(we[b]), .wdata(wdata[b]), .wr_ok(wr_ok[b]),
      .re(re[b]), .rdata(rdata[b]), .occ(occ[b])
    );
  end

endmodule
