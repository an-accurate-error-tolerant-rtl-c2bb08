// tile_ctrl: machine-cycle sequencer of a tile. It runs the dataflow
// pipeline of one layer: Data in, Memory write/read, MVM, ADC, ALU, Data out
// (MVM tile) or Data in, Memory write/read, ALU, Data out (non-MVM tile).
//
// Timing: a machine cycle is MC clocks (295). pp toggles at every machine
// cycle boundary and selects the halves of all double buffers. In each
// machine cycle:
//   clocks 0..HALF-1    FIFOs drain into their SRAM banks (drain_en);
//   clock  HALF         if operations remain and every bank holds the
//                       ceil(n_rows/8) inputs of the next one, the operation
//                       is launched, otherwise a stall is counted and the
//                       check repeats in the next machine cycle;
//   clocks HALF+1..     the launched operation's inputs are read from the
//                       SRAM (ld_re), 8 per core per clock, and written one
//                       clock later (ld_we, ld_widx) to the MVMin buffers
//                       (MVM tile) or ALUin buffers (non-MVM tile).
// A launched operation then moves one stage per machine cycle:
//   MVM:  core_start on clock 0 (cores integrate the inputs loaded earlier);
//   ADC:  ramp_start on clock 0; from clock XFER0 the ADC results move to the
//         ALUin buffers, 8 per core per clock (xfer_we, xfer_idx);
//   ALU:  a set_start every 4 clocks from clock 0, one per 16 outputs;
//   Out:  tout_ridx counts 0..ceil(bytes/32)-1 with tx_valid, one 256-bit
//         word per clock.
// Up to five operations are in flight at once, one per stage.
//
// run (a pulse) starts a layer with the configuration cfg; done rises when
// all n_mvm operations have left the Data out stage. The design leaves the
// control unit unspecified; this sequencer and its launch rule are this
// implementation's. stall_cnt counts machine cycles in which an operation
// was due but its inputs were not yet in the SRAM.
module tile_ctrl #(
  parameter int unsigned MC    = sonos_pkg::MC_CYCLES,
  parameter int unsigned XFER0 = 1 + sonos_pkg::MIDPT_CYCLES + sonos_pkg::RAMP_STEPS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  sonos_pkg::tile_cfg_t cfg,
  input  logic                 run,
  input  logic                 banks_ready,   // every bank holds n_reads inputs
  input  logic [11:0]          out_bytes,     // bytes in the TileOut half being read
  output logic [10:0]          n_reads,
  output logic                 pp,
  output logic [8:0]           mc_cnt,
  output logic                 drain_en,
  output logic                 ld_re,
  output logic                 ld_we,
  output logic [7:0]           ld_widx,
  output logic                 core_start,
  output logic                 ramp_start,
  output logic                 xfer_we,
  output logic [4:0]           xfer_idx,
  output logic                 set_start,
  output logic [5:0]           set_idx,
  output logic                 tout_wclr,
  output logic                 tx_valid,
  output logic [5:0]           tout_ridx,
  output logic                 busy,
  output logic                 done,
  output logic [15:0]          stall_cnt,
  output logic [15:0]          launched
);

  localparam int unsigned HALF = MC / 2;

  logic        running;
  logic        v_ld, v_mvm, v_adc, v_alu, v_out;
  logic [7:0]  ld_t;
  logic        ld_act;
  logic [15:0] completed;
  logic        is_mvm;
  logic [6:0]  n_sets;
  logic [5:0]  n_xfer;
  logic [6:0]  n_out;

  assign is_mvm  = (cfg.mode == sonos_pkg::MODE_MVM);
  assign n_reads = (cfg.n_rows + 11'd7) >> 3;
  assign n_sets  = is_mvm ? 7'(cfg.n_cols >> 4) : 7'(cfg.n_rows >> 4);
  assign n_xfer  = 6'(cfg.n_cols >> 3);
  assign n_out   = 7'((out_bytes + 12'd31) >> 5);

  assign drain_en   = running && (int'(mc_cnt) < HALF);
  assign ld_re      = ld_act && (11'(ld_t) < n_reads);
  assign core_start = running && v_mvm && (mc_cnt == '0);
  assign ramp_start = running && v_adc && (mc_cnt == '0);
  assign xfer_we    = running && v_adc && (mc_cnt >= 9'(XFER0)) && (mc_cnt < 9'(XFER0) + 9'(n_xfer));
  assign xfer_idx   = 5'(mc_cnt - 9'(XFER0));
  assign set_start  = running && v_alu && (mc_cnt[1:0] == 2'b00) && (7'(mc_cnt >> 2) < n_sets);
  assign set_idx    = 6'(mc_cnt >> 2);
  assign tout_wclr  = running && (mc_cnt == '0);
  assign tx_valid   = running && v_out && (mc_cnt < 9'(n_out));
  assign tout_ridx  = 6'(mc_cnt);
  assign done       = running && (completed == cfg.n_mvm);
  assign busy       = running && !done;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running   <= 1'b0;
      pp        <= 1'b0;
      mc_cnt    <= '0;
      v_ld      <= 1'b0;
      v_mvm     <= 1'b0;
      v_adc     <= 1'b0;
      v_alu     <= 1'b0;
      v_out     <= 1'b0;
      ld_act    <= 1'b0;
      ld_t      <= '0;
      ld_we     <= 1'b0;
      ld_widx   <= '0;
      completed <= '0;
      launched  <= '0;
      stall_cnt <= '0;
    end else if (run) begin
      running   <= 1'b1;
      mc_cnt    <= '0;
      v_ld      <= 1'b0;
      v_mvm     <= 1'b0;
      v_adc     <= 1'b0;
      v_alu     <= 1'b0;
      v_out     <= 1'b0;
      ld_act    <= 1'b0;
      completed <= '0;
      launched  <= '0;
      stall_cnt <= '0;
    end else if (running) begin
      // SRAM read of a launched operation, written one clock later
      ld_we   <= ld_re;
      ld_widx <= ld_t;
      if (ld_re) ld_t <= ld_t + 1'b1;

      if (int'(mc_cnt) == HALF && launched < cfg.n_mvm) begin
        if (banks_ready) begin
          v_ld     <= 1'b1;
          ld_act   <= 1'b1;
          ld_t     <= '0;
          launched <= launched + 1'b1;
        end else begin
          stall_cnt <= stall_cnt + 1'b1;
        end
      end

      if (int'(mc_cnt) == MC-1) begin
        mc_cnt <= '0;
        pp     <= ~pp;
        ld_act <= 1'b0;
        v_ld   <= 1'b0;
        v_mvm  <= v_ld && is_mvm;
        v_adc  <= v_mvm;
        v_alu  <= is_mvm ? v_adc : v_ld;
        v_out  <= v_alu;
        if (v_out) completed <= completed + 1'b1;
      end else begin
        mc_cnt <= mc_cnt + 1'b1;
      end
    end
  end

  // the read of a launched operation fits in the second half-cycle
  a_load_fits: assert property (@(posedge clk) disable iff (!rst_n)
    (running && int'(mc_cnt) == MC-1) |-> !ld_re);

endmodule
