// tileout_buf: the double-buffered tile output buffer (2 x 2 kB).
//
// The ALU appends n results per write (16, 32 or 64 bytes) to the half
// selected by pp, at a pointer that wclr resets at the start of each machine
// cycle; in the next cycle (pp toggled) the other half is read out, RD bytes
// per clock at byte index RD*ridx, towards the network (256-bit words).
// rcount is the number of bytes held in the half being read.
module tileout_buf #(
  parameter int unsigned BYTES = sonos_pkg::TILEOUT_BYTES,
  parameter int unsigned WMAX  = 4 * sonos_pkg::ALU_LANES,
  parameter int unsigned RD    = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          pp,
  input  logic                          wclr,
  input  logic                          we,
  input  logic [$clog2(WMAX+1)-1:0]     wn,
  input  logic [7:0]                    wdata [WMAX],
  input  logic [$clog2(BYTES/RD)-1:0]   ridx,
  output logic [7:0]                    rdata [RD],
  output logic [$clog2(BYTES+1)-1:0]    rcount
);

  logic [7:0]                    mem [2][BYTES];
  logic [$clog2(BYTES+1)-1:0]    cnt [2];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int i = 0; i < WMAX; i++)
        if (i < int'(wn) && (int'(cnt[pp]) + i) < BYTES)
          mem[pp][int'(cnt[pp]) + i] <= wdata[i];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt[0] <= '0;
      cnt[1] <= '0;
    end else if (wclr) begin
      cnt[pp] <= '0;
    end else if (we) begin
      cnt[pp] <= cnt[pp] + ($clog2(BYTES+1))'(wn);
    end
  end

  always_comb begin
    for (int i = 0; i < RD; i++) rdata[i] = mem[~pp][int'(ridx)*RD + i];
  end

  assign rcount = cnt[~pp];

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    we |-> (int'(cnt[pp]) + int'(wn) <= BYTES));

endmodule
