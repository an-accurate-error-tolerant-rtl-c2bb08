// sram_bank: one bank of the tile's activation SRAM, used as a circular
// queue: writes land at a write pointer, reads take from a read pointer, and
// an activation is dropped from the bank once it has been read (consumed by
// an MVM or an ALU operation).
//
// One write port and one read port. A read (re) returns the entry at the read
// pointer on rdata one clock later. occ is the number of stored entries;
// writes are refused when full (wr_ok low). Reset empties the bank.
module sram_bank #(
  parameter int unsigned DEPTH = sonos_pkg::BANK_DEPTH,
  parameter int unsigned W     = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       we,
  input  logic [W-1:0]               wdata,
  output logic                       wr_ok,
  input  logic                       re,
  output logic [W-1:0]               rdata,
  output logic [$clog2(DEPTH+1)-1:0] occ
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_we, do_re;

  assign wr_ok = (int'(occ) < DEPTH);
  assign do_we = we && wr_ok;
  assign do_re = re && (occ != '0);

  always_ff @(posedge clk) begin
    if (do_we) mem[wp] <= wdata;
    if (do_re) rdata   <= mem[rp];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      occ <= '0;
    end else begin
      if (do_we) wp <= (int'(wp) == DEPTH-1) ? '0 : wp + 1'b1;
      if (do_re) rp <= (int'(rp) == DEPTH-1) ? '0 : rp + 1'b1;
      if (do_we && !do_re)      occ <= occ + 1'b1;
      else if (do_re && !do_we) occ <= occ - 1'b1;
    end
  end

  a_no_empty_read: assert property (@(posedge clk) disable iff (!rst_n) re |-> occ != '0);

endmodule
