// core_ctrl: sequencer of one analog MVM (RESET, INT, DIV, OUT phases).
//
// On a start pulse it empties the integrators (1 clock), then for each input
// bit k = 0..7 (LSB first) it drives the rows for T_INT clocks with bit_sel =
// k. The bit-line currents follow the row drivers one clock later, so the
// integrators integrate on the T_INT clocks delayed by one (int_en), and one
// settle clock separates the end of the drive from the next phase. Between
// bits a one-clock DIV halves the integrated charge. After bit 7 a one-clock
// OUT scales the result into the analog pipeline buffer, and done pulses.
//
// Timing with the defaults: 1 + 8*(10+1) + 7 + 1 = 97 clocks from start to
// done, inside the first half of the 295-clock machine cycle. The 10-clock
// integration per bit is the design's; the settle clock and one-clock
// DIV/OUT phases are choices of this implementation.
module core_ctrl #(
  parameter int unsigned IN_BITS = sonos_pkg::IN_BITS,
  parameter int unsigned T_INT   = sonos_pkg::T_INT
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  output logic                          drive,    // row drivers on
  output logic [$clog2(IN_BITS)-1:0]    bit_sel,
  output logic                          rst_int,
  output logic                          int_en,
  output logic                          div_en,
  output logic                          out_en,
  output logic                          busy,
  output logic                          done
);

  typedef enum logic [2:0] {S_IDLE, S_RST, S_DRV, S_SETTLE, S_DIV, S_OUT} cstate_e;
  cstate_e                       st;
  logic [$clog2(T_INT+1)-1:0]    tcnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      tcnt    <= '0;
      bit_sel <= '0;
      int_en  <= 1'b0;
      done    <= 1'b0;
    end else begin
      done   <= 1'b0;
      int_en <= (st == S_DRV);
      unique case (st)
        S_IDLE:   if (start) st <= S_RST;
        S_RST: begin
          st      <= S_DRV;
          bit_sel <= '0;
          tcnt    <= '0;
        end
        S_DRV: begin
          tcnt <= tcnt + 1'b1;
          if (int'(tcnt) == T_INT-1) st <= S_SETTLE;
        end
        S_SETTLE: st <= (int'(bit_sel) == IN_BITS-1) ? S_OUT : S_DIV;
        S_DIV: begin
          st      <= S_DRV;
          tcnt    <= '0;
          bit_sel <= bit_sel + 1'b1;
        end
        S_OUT: begin
          st   <= S_IDLE;
          done <= 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign drive   = (st == S_DRV);
  assign rst_int = (st == S_RST);
  assign div_en  = (st == S_DIV);
  assign out_en  = (st == S_OUT);
  assign busy    = (st != S_IDLE);

endmodule
