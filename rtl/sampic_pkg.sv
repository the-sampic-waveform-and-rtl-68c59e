// Shared constants and configuration types of the SAMPIC waveform TDC model.
// The chip has 16 channels of 64 analog cells, a 12-bit Gray timestamp counter,
// an 11-bit Gray Wilkinson ADC counter and a 12-bit readout bus; those numbers
// follow the chip description. Analog levels (input, thresholds, stored cell
// voltages, ramp) are carried as unsigned 12-bit codes of the ~1 V input range,
// which is a modelling choice of this design.
package sampic_pkg;

  localparam int unsigned N_CH    = 16;  // channels
  localparam int unsigned N_CELLS = 64;  // SCA depth = DLL steps
  localparam int unsigned CELL_W  = 6;   // log2(N_CELLS)
  localparam int unsigned TS_W    = 12;  // coarse timestamp counter
  localparam int unsigned ADC_W   = 11;  // Wilkinson counter / max resolution
  localparam int unsigned BUS_W   = 12;  // readout bus
  localparam int unsigned VW      = 12;  // analog level code width
  localparam int unsigned DAC_W   = 10;  // threshold DAC

  typedef logic [VW-1:0] volt_t;

  // Per-channel configuration register (18 bits).
  typedef struct packed {
    logic              enable;       // channel may trigger
    logic              sel_local;    // own discriminator is a trigger source
    logic              sel_ext;      // external trigger is a source
    logic              sel_central;  // central OR trigger is a source
    logic              falling;      // 1: trigger on falling discriminator edge
    logic [1:0]        ptdelay;      // post-trigger delay: 0, 1 or 2 units
    logic              ext_thr;      // use external threshold instead of DAC
    logic [DAC_W-1:0]  dac;          // threshold DAC code
  } ch_cfg_t;

  // Global configuration register (16 bits).
  typedef struct packed {
    logic [5:0] roi_len_m1;   // RoI length minus one (1..64 cells)
    logic [5:0] roi_offset;   // first RoI cell relative to the trigger cell
    logic       roi_en;       // region-of-interest readout
    logic       fge_en;       // Fast Global Enable gating of triggers
    logic [1:0] res_sel;      // ADC resolution: 8 + res_sel bits
  } glb_cfg_t;

  function automatic logic [ADC_W-1:0] bin2gray_adc(input logic [ADC_W-1:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [ADC_W-1:0] gray2bin_adc(input logic [ADC_W-1:0] g);
    logic [ADC_W-1:0] b;
    b[ADC_W-1] = g[ADC_W-1];
    for (int i = ADC_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  function automatic logic [TS_W-1:0] gray2bin_ts(input logic [TS_W-1:0] g);
    logic [TS_W-1:0] b;
    b[TS_W-1] = g[TS_W-1];
    for (int i = TS_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // Largest code of an n-bit conversion, n = 8 + res_sel.
  function automatic logic [ADC_W-1:0] adc_max(input logic [1:0] res_sel);
    return ADC_W'((1 << (8 + int'(res_sel))) - 1);
  endfunction

endpackage
