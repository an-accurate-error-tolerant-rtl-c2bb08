// sonos_pkg: sizes, timing constants and shared types of the SONOS analog
// inference tile.
//
// The numbers follow the tile described for the accelerator: four analog MVM
// cores of 1152 rows x 256 differential columns (1152 x 512 SONOS cells each),
// 8-bit inputs, weights and ADC outputs, a 64 kB activation SRAM in 32 banks
// fed by 32 receive FIFOs, a 295-clock machine cycle, 10 clocks of
// integration per input bit, a 2-clock midpoint phase and a 256-step ramp.
// The enumerations (ALU mode, pooling, tile mode) and the timing of the core
// sequencer inside an input bit (a settle clock and a halving clock) are
// choices of this implementation.
package sonos_pkg;

  // ---- analog MVM core --------------------------------------------------
  localparam int unsigned ROWS        = 1152; // SONOS rows per core
  localparam int unsigned COLS        = 256;  // differential BL pairs per core
  localparam int unsigned IN_BITS     = 8;    // input activation width
  localparam int unsigned W_BITS      = 8;    // weight: sign + 7-bit magnitude
  localparam int unsigned T_INT       = 10;   // clocks of integration per input bit
  localparam int unsigned GAIN_BITS   = 16;   // gain code of the scaling amplifier
  localparam int unsigned GAIN_SHIFT  = 16;   // gain = code / 2^GAIN_SHIFT
  localparam int unsigned ACC_BITS    = 40;   // integrator charge, fixed point
  localparam int unsigned ACC_FRAC    = 8;    // fraction bits kept through halving
  localparam int unsigned V_BITS      = 24;   // scaled integrator voltage, ADC LSBs

  // ---- ramp ADC ---------------------------------------------------------
  localparam int unsigned ADC_BITS     = 8;
  localparam int unsigned RAMP_STEPS   = 256;
  localparam int unsigned MIDPT_CYCLES = 2;

  // ---- tile -------------------------------------------------------------
  localparam int unsigned N_CORES       = 4;
  localparam int unsigned N_BANKS       = 32;
  localparam int unsigned BANK_DEPTH    = 2048;  // 32 x 2048 B = 64 kB
  localparam int unsigned FIFO_DEPTH    = 256;   // 32 x 256 B = 2 x 4 kB
  localparam int unsigned MVMIN_BYTES   = 1152;  // 1.125 kB per core
  localparam int unsigned ALUIN_BYTES   = 1024;  // per half of a double buffer
  localparam int unsigned TILEOUT_BYTES = 2048;  // per half of a double buffer
  localparam int unsigned BIAS_DEPTH    = 1024;  // 1.5 kB of 12-bit biases
  localparam int unsigned BIAS_BITS     = 12;
  localparam int unsigned ALU_LANES     = 16;    // operands per core per ALU set
  localparam int unsigned ALU_SET_CYC   = 4;     // one ALU set every 4 clocks
  localparam int unsigned MC_CYCLES     = 295;   // machine cycle, clocks at 1 GHz
  localparam int unsigned LOAD_BYTES    = 8;     // bytes moved per clock per core

  // operation of the ALU adders
  typedef enum logic [1:0] {
    ALU_NONE = 2'd0,  // every core's operands pass the adders, plus bias
    ALU_SUM2 = 2'd1,  // cores 0+1 and cores 2+3 are summed
    ALU_SUM4 = 2'd2   // all four cores are summed
  } alu_mode_e;

  typedef enum logic [1:0] {
    POOL_OFF = 2'd0,
    POOL_MAX = 2'd1,  // max over the four cores' lanes (2x2 window)
    POOL_AVG = 2'd2   // average over the four cores' lanes (2x2 window)
  } pool_e;

  typedef enum logic {
    MODE_MVM    = 1'b0, // SRAM -> MVMin -> core -> ADC -> ALUin -> ALU
    MODE_NONMVM = 1'b1  // SRAM -> ALUin -> ALU
  } tile_mode_e;

  // per-layer configuration of a tile
  typedef struct packed {
    tile_mode_e        mode;
    logic              signed_in;   // first-layer signed inputs, 4 cells per weight
    logic [10:0]       n_rows;      // inputs per core per MVM (MVM mode) or per set of loads
    logic [8:0]        n_cols;      // used BL pairs per core, multiple of 16
    logic [15:0]       n_mvm;       // operations to run
    alu_mode_e         alu_mode;
    logic              bias_en;
    logic              relu_en;
    logic              adc_operands; // ALU operands are offset-binary ADC codes
    pool_e             pool;
    logic [7:0]        scale;       // rescaling multiplier
    logic [4:0]        shift;       // rescaling right shift
  } tile_cfg_t;

endpackage
