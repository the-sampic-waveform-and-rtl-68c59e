// SAMPIC0 waveform TDC, digital model of the whole chip. Sixteen channels
// share one 64-step DLL, which sets the cell each analog memory is sampling,
// and one 12-bit Gray timestamp counter that advances once per DLL turn. A
// channel's trigger stops its memory and latches the coarse time (timestamp)
// and the medium time (trigger cell); the waveform in the 64 cells gives the
// fine time after digitisation. `flag_trig` tells the acquisition system that
// events wait; it answers with `conv_start`, which converts all held channels
// at once with the Wilkinson ADCs (shared oscillator and Gray counter, one
// ramp per channel, one comparator and register per cell). `flag_data` then
// asks for readout: under Read/RCk the channels are read one per frame, with
// rotating priority, on the 12-bit bus. Configuration is loaded over SPI.
// The whole model runs on one clock whose period is one DLL step (156 ps at
// 6.4 GS/s); the ADC oscillator and RCk act as clock enables. Analog levels
// are 12-bit codes. The architecture follows the chip; the single clock
// domain, the codes and all register and frame formats are this design's
// choices.
module sampic_top
  import sampic_pkg::*;
#(
  parameter int unsigned PT_UNIT = 6,
  parameter int unsigned VCO_DIV = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  volt_t            vin [N_CH],
  input  volt_t            vth_ext,
  input  logic             ext_trig,
  input  logic             fge,
  input  logic             spi_sclk,
  input  logic             spi_mosi,
  input  logic             spi_cs_n,
  output logic             spi_miso,
  input  logic             conv_start,
  input  logic             rd,
  input  logic             rck_ce,
  output logic [BUS_W-1:0] bus_data,
  output logic             bus_valid,
  output logic             bus_last,
  output logic             flag_trig,
  output logic             flag_data,
  output logic             conv_busy
);
  ch_cfg_t  ch_cfg [N_CH];
  glb_cfg_t glb_cfg;

  logic [CELL_W-1:0] wr_ptr;
  logic [N_CELLS-1:0] th;
  logic              wrap;
  logic [TS_W-1:0]   ts_gray;

  logic [N_CH-1:0]   local_hit, ch_en, pending, ready, buf_full, sampling;
  logic [N_CH-1:0]   conv_sel, release_buf;
  logic              central;
  logic [TS_W-1:0]   ts_buf   [N_CH];
  logic [CELL_W-1:0] cell_buf [N_CH];
  logic [ADC_W-1:0]  codes    [N_CH][N_CELLS];

  logic              start_pulse, vco_en, conv_run, cnt_en, conv_finish, tick;
  logic [ADC_W-1:0]  cnt_gray, cnt_bin, max_code;
  logic [1:0]        res_conv;

  logic [$clog2(N_CH)-1:0] rd_ch;
  logic [CELL_W-1:0]       rd_cell;

  spi_config #(.N_CH(N_CH)) u_spi (
    .clk, .rst_n, .spi_sclk, .spi_mosi, .spi_cs_n, .spi_miso, .ch_cfg, .glb_cfg
  );

  dll_model #(.N_CELLS(N_CELLS)) u_dll (.clk, .rst_n, .wr_ptr, .th, .wrap);

  gray_counter #(.WIDTH(TS_W)) u_ts (
    .clk, .rst_n, .clr(1'b0), .en(wrap), .gray(ts_gray), .bin()
  );

  for (genvar c = 0; c < N_CH; c++) begin : g_en
    assign ch_en[c] = ch_cfg[c].enable;
  end

  central_trigger #(.N_CH(N_CH)) u_central (.local_hit, .ch_en, .central);

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    sampic_channel #(.PT_UNIT(PT_UNIT)) u_ch (
      .clk, .rst_n, .vin(vin[c]), .vth_ext, .cfg(ch_cfg[c]), .res_sel(res_conv),
      .ext_trig, .central, .fge, .fge_en(glb_cfg.fge_en), .local_hit(local_hit[c]),
      .wr_ptr, .th, .ts_gray,
      .conv_start(start_pulse), .conv_sel(conv_sel[c]), .conv_run, .adc_tick(tick),
      .count_gray(cnt_gray), .conv_finish, .max_gray(bin2gray_adc(max_code)),
      .sampling(sampling[c]), .pending(pending[c]), .ready(ready[c]),
      .buf_full(buf_full[c]), .ts_buf(ts_buf[c]), .cell_buf(cell_buf[c]),
      .codes(codes[c]), .release_buf(release_buf[c])
    );
  end

  conversion_controller #(.N_CH(N_CH)) u_conv (
    .clk, .rst_n, .start(conv_start), .ready, .res_sel(glb_cfg.res_sel), .tick,
    .count_bin(cnt_bin), .start_pulse, .vco_en, .run(conv_run), .cnt_en, .conv_sel,
    .finish(conv_finish), .busy(conv_busy), .max_code, .res_conv
  );

  adc_vco #(.DIV(VCO_DIV)) u_vco (.clk, .rst_n, .en(vco_en), .tick);

  gray_counter #(.WIDTH(ADC_W)) u_adc_cnt (
    .clk, .rst_n, .clr(start_pulse), .en(cnt_en), .gray(cnt_gray), .bin(cnt_bin)
  );

  readout_controller #(.N_CH(N_CH)) u_ro (
    .clk, .rst_n, .rd, .rck_ce, .cfg(glb_cfg), .buf_full, .ts_gray(ts_buf),
    .trig_cell(cell_buf), .rd_ch, .rd_cell, .rd_code(codes[rd_ch][rd_cell]),
    .bus_data, .bus_valid, .bus_last, .release_buf
  );

  assign flag_trig = |pending;
  assign flag_data = |buf_full;
endmodule
