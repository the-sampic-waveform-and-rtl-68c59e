// One SAMPIC channel: discriminator with threshold DAC, trigger logic,
// 64-cell analog memory, the channel's ramp and 64 comparators, the 64 ADC
// registers (which are also the readout buffer) and the channel controller.
// The channel records continuously; a trigger stops it and latches the coarse
// timestamp and trigger cell. The shared conversion controller then converts
// it (`conv_sel`) together with all other held channels, after which it
// records again while its data waits in the buffer for the readout. The
// composition follows the chip's channel; see the submodules for timing.
module sampic_channel
  import sampic_pkg::*;
#(
  parameter int unsigned PT_UNIT = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  // analog side
  input  volt_t             vin,
  input  volt_t             vth_ext,
  // configuration and triggers
  input  ch_cfg_t           cfg,
  input  logic [1:0]        res_sel,
  input  logic              ext_trig,
  input  logic              central,
  input  logic              fge,
  input  logic              fge_en,
  output logic              local_hit,
  // common timing
  input  logic [CELL_W-1:0] wr_ptr,
  input  logic [N_CELLS-1:0] th,
  input  logic [TS_W-1:0]   ts_gray,
  // conversion
  input  logic              conv_start,
  input  logic              conv_sel,
  input  logic              conv_run,
  input  logic              adc_tick,
  input  logic [ADC_W-1:0]  count_gray,
  input  logic              conv_finish,
  input  logic [ADC_W-1:0]  max_gray,
  // status and buffer
  output logic              sampling,
  output logic              pending,
  output logic              ready,
  output logic              buf_full,
  output logic [TS_W-1:0]   ts_buf,
  output logic [CELL_W-1:0] cell_buf,
  output logic [ADC_W-1:0]  codes [N_CELLS],
  input  logic              release_buf
);
  logic               disc, trig;
  volt_t              cells [N_CELLS];
  logic [N_CELLS-1:0] cmp;

  discriminator u_disc (
    .vin, .dac_code(cfg.dac), .vth_ext, .use_ext(cfg.ext_thr), .out(disc)
  );

  channel_trigger #(.PT_UNIT(PT_UNIT)) u_trig (
    .clk, .rst_n, .disc, .cfg, .ext_trig, .central, .fge, .fge_en,
    .local_hit, .trig
  );

  sca_memory #(.N_CELLS(N_CELLS)) u_sca (
    .clk, .write_en(sampling), .th, .vin, .cells
  );

  ramp_comparators #(.N_CELLS(N_CELLS)) u_ramp (
    .clk, .rst_n, .clr(conv_start), .run(conv_run && conv_sel), .tick(adc_tick),
    .cmp_en(conv_sel), .res_sel, .cells, .cmp
  );

  adc_latch_bank #(.N_CELLS(N_CELLS)) u_adc (
    .clk, .rst_n, .start(conv_start && ready), .en(conv_sel), .cmp,
    .count_gray, .finish(conv_finish), .max_gray, .codes
  );

  channel_controller u_ctrl (
    .clk, .rst_n, .trig, .wr_ptr, .ts_gray, .conv_sel,
    .conv_done(conv_finish && conv_sel), .release_buf,
    .sampling, .pending, .ready, .buf_full, .ts_buf, .cell_buf
  );
endmodule
