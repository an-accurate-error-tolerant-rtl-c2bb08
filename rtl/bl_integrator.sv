// bl_integrator: behavioural model of the analog circuit on one bit-line pair
// (current conveyors, SIR integrator, tunable-gain amplifier and the analog
// pipeline buffer). Not synthesizable hardware: voltages and charges are
// represented by integers.
//
// How it works
//  * Current buffering and subtraction: the two current conveyors hold both
//    bit lines at a virtual ground and deliver i_pos - i_neg to the
//    integration node.
//  * Integration and input-bit accumulation (successive integration and
//    rescaling): rst_int empties the capacitor; each clock with int_en high
//    adds the difference current (INT); div_en shares the charge with an
//    equal, empty capacitor and so halves it (DIV). Integrating bit 0 first
//    and halving between bits gives sum_k I_k * 2^(k-7): the shift-and-add of
//    the input bits is done on the charge, and one conversion serves all 8
//    bits. ACC_FRAC fraction bits make the halving exact.
//  * Voltage scaling: on out_en the charge is multiplied by the calibrated
//    gain of the non-inverting amplifier, gain = gain_code / 2^GAIN_SHIFT
//    (the code stands for the programmed SONOS feedback resistor), floored to
//    whole ADC LSBs and stored in the analog pipeline buffer selected by pp.
//  * Analog pipeline buffer: two holding capacitors. While the integrator
//    writes buffer pp, the ADC reads vout = buffer !pp, so an MVM and the
//    conversion of the previous one overlap.
//
// Units: vout is in ADC LSBs, 0 at the ramp midpoint. The gain code is
// written through gain_we. Reset of the buffers and gain is asynchronous-free:
// rst_n clears them synchronously.
module bl_integrator #(
  parameter int unsigned IW         = 18,                    // bit-line current width
  parameter int unsigned ACC_BITS   = sonos_pkg::ACC_BITS,
  parameter int unsigned ACC_FRAC   = sonos_pkg::ACC_FRAC,
  parameter int unsigned GAIN_BITS  = sonos_pkg::GAIN_BITS,
  parameter int unsigned GAIN_SHIFT = sonos_pkg::GAIN_SHIFT,
  parameter int unsigned V_BITS     = sonos_pkg::V_BITS
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [IW-1:0]               i_pos,
  input  logic [IW-1:0]               i_neg,
  input  logic                        rst_int,   // RESET: empty the integrator
  input  logic                        int_en,    // INT: integrate one clock
  input  logic                        div_en,    // DIV: halve the charge
  input  logic                        out_en,    // OUT: scale and store
  input  logic                        pp,        // buffer written by this MVM
  input  logic                        gain_we,
  input  logic [GAIN_BITS-1:0]        gain_code,
  output logic signed [V_BITS-1:0]    vout       // held voltage read by the ADC
);

  localparam int unsigned PW = ACC_BITS + GAIN_BITS + 1;

  logic signed [ACC_BITS-1:0] acc;
  logic        [GAIN_BITS-1:0] gain;
  logic signed [V_BITS-1:0]   vbuf [2];

  logic signed [ACC_BITS-1:0] diff;
  logic signed [PW-1:0]       prod;
  logic signed [PW-1:0]       vscaled;
  logic signed [V_BITS-1:0]   vsat;

  localparam logic signed [PW-1:0] VMAX = PW'((64'sd1 <<< (V_BITS-1)) - 1);
  localparam logic signed [PW-1:0] VMIN = -PW'(64'sd1 <<< (V_BITS-1));

  always_comb begin
    diff    = (ACC_BITS'($signed({1'b0, i_pos})) - ACC_BITS'($signed({1'b0, i_neg})))
              <<< ACC_FRAC;
    prod    = PW'(acc) * $signed({1'b0, gain});
    vscaled = prod >>> (GAIN_SHIFT + ACC_FRAC);
    if (vscaled > VMAX)      vsat = VMAX[V_BITS-1:0];
    else if (vscaled < VMIN) vsat = VMIN[V_BITS-1:0];
    else                     vsat = vscaled[V_BITS-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc     <= '0;
      gain    <= '0;
      vbuf[0] <= '0;
      vbuf[1] <= '0;
    end else begin
      if (gain_we) gain <= gain_code;
      if (rst_int)      acc <= '0;
      else if (int_en)  acc <= acc + diff;
      else if (div_en)  acc <= acc >>> 1;
      if (out_en) vbuf[pp] <= vsat;
    end
  end

  assign vout = vbuf[~pp];

endmodule
