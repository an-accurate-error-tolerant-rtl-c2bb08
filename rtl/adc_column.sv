// adc_column: the per-column part of the parallel ramp ADC, one per bit-line
// pair: midpoint comparator and latch, power gating of the two ramp
// comparators, and the 8-bit result register.
//
// How it works: during MIDPT the input is compared with the ramp midpoint and
// the result is latched. It selects which ramp comparator is powered for the
// conversion: the NMOS-input comparator for an input above the midpoint, the
// PMOS-input comparator otherwise; the other is gated off. During the ramp,
// the powered comparator switches on the first step whose level reaches the
// input, and on that clock the shared counter value is written into the
// result register; later steps leave it alone. The register is preset to
// full scale when MIDPT begins, so an input above the top of the ramp reads
// 255, and an input at or below the bottom reads 0: out-of-range values clip
// to the end levels.
//
// The comparators are represented by integer compares of the held voltage
// vin (ADC LSBs, 0 = midpoint) with the ramp level. Output code = clamp(vin +
// 128, 0, 255), valid from the clock after the ramp ends until the next
// MIDPT. n_on / p_on show which comparator is powered (for power accounting).
module adc_column #(
  parameter int unsigned ADC_BITS = sonos_pkg::ADC_BITS,
  parameter int unsigned V_BITS   = sonos_pkg::V_BITS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic signed [V_BITS-1:0]  vin,      // analog pipeline buffer voltage
  input  logic                      midpt,    // MIDPT phase (shared)
  input  logic                      ramp_on,  // ramp phase (shared)
  input  logic [ADC_BITS-1:0]       code,     // shared counter
  input  logic signed [ADC_BITS:0]  ramp_lvl, // shared ramp voltage
  output logic [ADC_BITS-1:0]       q,        // conversion result
  output logic                      n_on,
  output logic                      p_on
);

  logic upper;     // midpoint latch: input above the ramp midpoint
  logic captured;  // result register already written in this conversion
  logic cmp_n, cmp_p, cmp;

  always_comb begin
    n_on  = ramp_on &  upper;
    p_on  = ramp_on & ~upper;
    cmp_n = n_on & (V_BITS'(ramp_lvl) >= vin);
    cmp_p = p_on & (V_BITS'(ramp_lvl) >= vin);
    cmp   = upper ? cmp_n : cmp_p;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      upper    <= 1'b0;
      captured <= 1'b0;
      q        <= '0;
    end else if (midpt) begin
      upper    <= (vin > 0);
      captured <= 1'b0;
      q        <= '1;
    end else if (cmp && !captured) begin
      q        <= code;
      captured <= 1'b1;
    end
  end

endmodule
