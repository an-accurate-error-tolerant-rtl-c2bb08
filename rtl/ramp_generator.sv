// ramp_generator: the staircase ramp shared by the ADCs of a tile's cores.
//
// An 8-bit counter, clocked at the 1 GHz system clock, steps through 256
// codes; a capacitive DAC between the two reference voltages turns the code
// into the ramp voltage. Before the ramp, a 2-clock MIDPT phase lets every
// column compare its input with the ramp midpoint. A conversion therefore
// takes MIDPT_CYCLES + RAMP_STEPS = 258 clocks from start.
//
// Interface and timing: a one-clock start pulse launches a conversion (it is
// ignored while one is running). midpt is high for the 2 clocks after start,
// then ramp_on is high for 256 clocks while code counts 0..255; done pulses
// on the clock after the last step. ramp_lvl is the DAC output in ADC LSBs,
// code - 128, so the midpoint reference is level 0. The CDAC is represented
// by that linear map; the counter and phase sequencing are logic.
module ramp_generator #(
  parameter int unsigned ADC_BITS     = sonos_pkg::ADC_BITS,
  parameter int unsigned MIDPT_CYCLES = sonos_pkg::MIDPT_CYCLES
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  output logic                       midpt,
  output logic                       ramp_on,
  output logic [ADC_BITS-1:0]        code,
  output logic signed [ADC_BITS:0]   ramp_lvl,
  output logic                       done,
  output logic                       busy
);

  typedef enum logic [1:0] {R_IDLE, R_MIDPT, R_RAMP} rstate_e;
  rstate_e                           st;
  logic [$clog2(MIDPT_CYCLES+1)-1:0] mcnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st   <= R_IDLE;
      mcnt <= '0;
      code <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        R_IDLE: if (start) begin
          st   <= R_MIDPT;
          mcnt <= '0;
          code <= '0;
        end
        R_MIDPT: begin
          mcnt <= mcnt + 1'b1;
          if (int'(mcnt) == MIDPT_CYCLES-1) st <= R_RAMP;
        end
        R_RAMP: begin
          code <= code + 1'b1;
          if (&code) begin
            st   <= R_IDLE;
            done <= 1'b1;
          end
        end
        default: st <= R_IDLE;
      endcase
    end
  end

  assign midpt    = (st == R_MIDPT);
  assign ramp_on  = (st == R_RAMP);
  assign busy     = (st != R_IDLE);
  assign ramp_lvl = $signed({1'b0, code}) - $signed((ADC_BITS+1)'(1 << (ADC_BITS-1)));

endmodule
