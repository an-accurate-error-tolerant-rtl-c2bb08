// sonos_tile: one tile of the SONOS analog inference accelerator, the unit
// that is replicated and connected by the on-chip network to run a whole
// CNN. Weights stay in the non-volatile SONOS arrays of the four analog MVM
// cores; only 8-bit activations move.
//
// Datapath (MVM tile): network -> 32 receive FIFOs -> 32-bank 64 kB SRAM ->
// four MVMin buffers -> four analog MVM cores (ramp generator shared) ->
// four double-buffered ALUin buffers -> ALU (adders + bias, ReLU,
// rescaling, pooling) -> double-buffered TileOut -> network. A non-MVM tile
// (pooling, element-wise addition) loads the ALUin buffers straight from the
// SRAM. tile_ctrl runs the pipeline in 295-clock machine cycles, one stage
// per machine cycle, with every stage busy on a different operation.
//
// Data layout: bank b feeds core b/8; input row r of a core comes from bank
// 8*core + r%8 (the sender duplicates an activation into every bank and
// position it is needed at). Core c's results go to ALUin buffer c. Signed
// inputs occupy the even rows, with a zero on each odd row.
//
// Ports: rx_* is one byte lane per FIFO with valid/ready; tx_valid/tx_data
// send one 256-bit word (32 bytes, byte 0 first) per clock, with no
// back-pressure; prog_* writes one weight row of one core per clock; gain_*
// sets the amplifier gain of one column; bias_* writes one 12-bit bias;
// cfg_we loads the layer configuration; run starts the layer. The tile
// structure and sizes follow the design; port protocols, data layout and
// control are this implementation's choices.
module sonos_tile #(
  parameter int unsigned ROWS  = sonos_pkg::ROWS,
  parameter int unsigned COLS  = sonos_pkg::COLS,
  parameter int unsigned T_INT = sonos_pkg::T_INT
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // configuration and control
  input  logic                           cfg_we,
  input  sonos_pkg::tile_cfg_t           cfg_in,
  input  logic                           run,
  output logic                           busy,
  output logic                           done,
  output logic [15:0]                    stall_cnt,
  output logic [15:0]                    launched,
  // network input: one byte lane per receive FIFO
  input  logic [31:0]                    rx_valid,
  input  logic [7:0]                     rx_data [32],
  output logic [31:0]                    rx_ready,
  // network output
  output logic                           tx_valid,
  output logic [7:0]                     tx_data [32],
  // weight programming
  input  logic                           prog_we,
  input  logic [1:0]                     prog_core,
  input  logic [$clog2(ROWS)-1:0]        prog_row,
  input  logic signed [7:0]              prog_w [COLS],
  // gain calibration
  input  logic                           gain_we,
  input  logic [1:0]                     gain_core,
  input  logic [$clog2(COLS)-1:0]        gain_col,
  input  logic [sonos_pkg::GAIN_BITS-1:0] gain_code,
  // bias memory
  input  logic                           bias_we,
  input  logic [$clog2(4*COLS)-1:0]      bias_idx,
  input  logic signed [11:0]             bias_val
);

  localparam int unsigned NB    = sonos_pkg::N_BANKS;
  localparam int unsigned BD    = sonos_pkg::BANK_DEPTH;
  localparam int unsigned LD    = sonos_pkg::LOAD_BYTES;
  localparam int unsigned LN    = sonos_pkg::ALU_LANES;
  localparam int unsigned ASETS = sonos_pkg::ALUIN_BYTES / LN;
  localparam int unsigned CSETS = COLS / LN;

  sonos_pkg::tile_cfg_t cfg;
  always_ff @(posedge clk) begin
    if (!rst_n)      cfg <= '0;
    else if (cfg_we) cfg <= cfg_in;
  end

  // ---- controller ----------------------------------------------------------
  logic        pp, drain_en, ld_re, ld_we, core_start, ramp_start, xfer_we;
  logic        set_start, tout_wclr, banks_ready;
  logic [8:0]  mc_cnt;
  logic [7:0]  ld_widx;
  logic [4:0]  xfer_idx;
  logic [5:0]  set_idx, tout_ridx;
  logic [10:0] n_reads;
  logic [11:0] out_bytes;

  tile_ctrl u_ctrl (
    .clk, .rst_n, .cfg, .run, .banks_ready, .out_bytes, .n_reads, .pp, .mc_cnt,
    .drain_en, .ld_re, .ld_we, .ld_widx, .core_start, .ramp_start, .xfer_we,
    .xfer_idx, .set_start, .set_idx, .tout_wclr, .tx_valid, .tout_ridx,
    .busy, .done, .stall_cnt, .launched
  );

  // ---- Data in: receive FIFOs -> SRAM ---------------------------------------
  logic [NB-1:0]              f_empty, s_we, s_wr_ok, s_re;
  logic [7:0]                 f_dout [NB];
  logic [7:0]                 s_rdata [NB];
  logic [$clog2(BD+1)-1:0]    s_occ [NB];

  for (genvar b = 0; b < NB; b++) begin : g_in
    rx_fifo u_fifo (
      .clk, .rst_n, .push_valid(rx_valid[b]), .push_ready(rx_ready[b]),
      .din(rx_data[b]), .pop(s_we[b]), .dout(f_dout[b]), .empty(f_empty[b]),
      .count()
    );
    assign s_we[b] = drain_en && !f_empty[b] && s_wr_ok[b];
    assign s_re[b] = ld_re;
  end

  act_sram u_sram (
    .clk, .rst_n, .we(s_we), .wdata(f_dout), .wr_ok(s_wr_ok), .re(s_re),
    .rdata(s_rdata), .occ(s_occ)
  );

  always_comb begin
    banks_ready = 1'b1;
    for (int b = 0; b < NB; b++)
      if (s_occ[b] < ($clog2(BD+1))'(n_reads)) banks_ready = 1'b0;
  end

  // ---- shared ramp -----------------------------------------------------------
  logic                                 midpt, ramp_on;
  logic [sonos_pkg::ADC_BITS-1:0]       code;
  logic signed [sonos_pkg::ADC_BITS:0]  ramp_lvl;

  ramp_generator u_ramp (
    .clk, .rst_n, .start(ramp_start), .midpt, .ramp_on, .code, .ramp_lvl,
    .done(), .busy()
  );

  // ---- cores and their buffers ---------------------------------------------------
  logic [7:0] alu_opnd [4][LN];
  logic [$clog2(ASETS)-1:0] alu_ridx;

  for (genvar c = 0; c < 4; c++) begin : g_core
    logic [7:0]                 x_all [sonos_pkg::MVMIN_BYTES];
    logic [7:0]                 x [ROWS];
    logic [7:0]                 ld_bytes [LD];
    logic [7:0]                 xf_bytes [LD];
    logic [7:0]                 q [COLS];
    logic                       is_mvm;
    logic [7:0]                 ain_w [LD];
    logic                       ain_we;
    logic [$clog2(sonos_pkg::ALUIN_BYTES/LD)-1:0] ain_widx;

    assign is_mvm = (cfg.mode == sonos_pkg::MODE_MVM);

    for (genvar i = 0; i < LD; i++) begin : g_b
      assign ld_bytes[i] = s_rdata[c*LD + i];
      assign xf_bytes[i] = q[(int'(xfer_idx)*LD + i) % COLS];
    end

    mvmin_buf u_mvmin (
      .clk, .rst_n, .we(ld_we && is_mvm),
      .widx(($clog2(sonos_pkg::MVMIN_BYTES/LD))'(ld_widx)),
      .wdata(ld_bytes), .x(x_all)
    );

    for (genvar r = 0; r < ROWS; r++) begin : g_x
      assign x[r] = x_all[r];
    end

    mvm_core #(.ROWS(ROWS), .COLS(COLS), .T_INT(T_INT)) u_core (
      .clk, .rst_n, .x, .signed_in(cfg.signed_in),
      .n_rows(($clog2(ROWS+1))'(cfg.n_rows)), .start(core_start), .pp,
      .busy(), .done(),
      .prog_we(prog_we && prog_core == 2'(c)), .prog_row, .prog_w,
      .gain_we(gain_we && gain_core == 2'(c)), .gain_col, .gain_code,
      .midpt, .ramp_on, .code, .ramp_lvl, .q
    );

    always_comb begin
      if (is_mvm) begin
        ain_we   = xfer_we;
        ain_widx = ($clog2(sonos_pkg::ALUIN_BYTES/LD))'(xfer_idx);
        ain_w    = xf_bytes;
      end else begin
        ain_we   = ld_we;
        ain_widx = ($clog2(sonos_pkg::ALUIN_BYTES/LD))'(ld_widx);
        ain_w    = ld_bytes;
      end
    end

    aluin_buf u_aluin (
      .clk, .pp, .we(ain_we), .widx(ain_widx), .wdata(ain_w),
      .ridx(alu_ridx), .rdata(alu_opnd[c])
    );
  end

  assign alu_ridx = ($clog2(ASETS))'(set_idx);

  // ---- ALU -----------------------------------------------------------------------
  logic [1:0]                    bias_core;
  logic [$clog2(ASETS)-1:0]      bias_set;
  logic signed [11:0]            bias_rd [LN];
  logic                          alu_valid;
  logic [$clog2(4*LN+1)-1:0]     alu_n;
  logic [7:0]                    alu_data [4*LN];

  bias_mem #(.DEPTH(4*COLS)) u_bias (
    .clk, .we(bias_we), .widx(bias_idx), .wdata(bias_val),
    .ridx(($clog2(4*CSETS))'(int'(bias_core)*CSETS + (int'(bias_set) % CSETS))),
    .rdata(bias_rd)
  );

  tile_alu #(.NSETS(ASETS)) u_alu (
    .clk, .rst_n, .alu_mode(cfg.alu_mode), .bias_en(cfg.bias_en),
    .relu_en(cfg.relu_en), .adc_operands(cfg.adc_operands), .pool(cfg.pool),
    .scale(cfg.scale), .shift(cfg.shift),
    .set_start, .set_idx(($clog2(ASETS))'(set_idx)), .opnd(alu_opnd),
    .bias_core, .bias_set, .bias(bias_rd),
    .out_valid(alu_valid), .out_n(alu_n), .out_data(alu_data), .busy()
  );

  // ---- Data out --------------------------------------------------------------------
  tileout_buf u_tout (
    .clk, .rst_n, .pp, .wclr(tout_wclr), .we(alu_valid), .wn(alu_n),
    .wdata(alu_data), .ridx(tout_ridx), .rdata(tx_data), .rcount(out_bytes)
  );

endmodule
