// rx_fifo: one of the tile's receive FIFOs. Activations arriving from the
// network are queued here until the first half of a machine cycle moves them
// into the SRAM bank the FIFO feeds.
//
// A circular buffer of DEPTH bytes with a valid/ready push side and a pop
// side. push is accepted when ready (not full); pop takes the head, shown
// combinationally on dout, when not empty. A push and a pop may happen in the
// same clock. count is the fill level. Synchronous reset empties it.
// Thirty-two of these (8 kB in all) feed the 32 banks; 256 bytes each is this
// implementation's split of that total.
module rx_fifo #(
  parameter int unsigned DEPTH = sonos_pkg::FIFO_DEPTH,
  parameter int unsigned W     = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push_valid,
  output logic                       push_ready,
  input  logic [W-1:0]               din,
  input  logic                       pop,
  output logic [W-1:0]               dout,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_push, do_pop;

  assign empty      = (count == '0);
  assign push_ready = (int'(count) < DEPTH);
  assign do_push    = push_valid && push_ready;
  assign do_pop     = pop && !empty;
  assign dout       = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= (int'(wp) == DEPTH-1) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (int'(rp) == DEPTH-1) ? '0 : rp + 1'b1;
      if (do_push && !do_pop)      count <= count + 1'b1;
      else if (do_pop && !do_push) count <= count - 1'b1;
    end
  end

  // a pop is only issued when data is present
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
