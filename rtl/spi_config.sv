// SPI slave holding the chip's configuration registers. The SPI pins are
// synchronised into the core clock and sampled there, so SCLK must be slower
// than a quarter of the core clock. Frames are 32 bits, MSB first, mode 0
// (data sampled on the rising SCLK edge, changed on the falling edge):
//   bit 31 = 1 for a read, bits 30:24 = address, bits 23:0 = data.
// A write takes effect on the 32nd rising edge. For a read, the register is
// sent on MISO during bits 23:0. Register map:
//   0..15 : channel configuration (ch_cfg_t, 18 bits, right-aligned)
//   16    : global configuration (glb_cfg_t, 16 bits, right-aligned)
// Reset: all channels disabled, 11-bit conversion, no RoI, FGE off.
// That the chip is configured over SPI follows the chip description; the
// frame format and register map are this design's choices.
module spi_config
  import sampic_pkg::ch_cfg_t, sampic_pkg::glb_cfg_t;
#(
  parameter int unsigned N_CH = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     spi_sclk,
  input  logic     spi_mosi,
  input  logic     spi_cs_n,
  output logic     spi_miso,
  output ch_cfg_t  ch_cfg [N_CH],
  output glb_cfg_t glb_cfg
);
  logic [2:0]  sclk_s;
  logic [1:0]  cs_s;
  logic [1:0]  mosi_s;
  logic [5:0]  bitcnt;
  logic [30:0] rx;
  logic [23:0] tx;
  logic        rise, fall, active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0; cs_s <= '1; mosi_s <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], spi_sclk};
      cs_s   <= {cs_s[0], spi_cs_n};
      mosi_s <= {mosi_s[0], spi_mosi};
    end
  end

  assign active = !cs_s[1];
  assign rise   = active && sclk_s[1] && !sclk_s[2];
  assign fall   = active && !sclk_s[1] && sclk_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bitcnt <= '0; rx <= '0; tx <= '0;
      for (int i = 0; i < N_CH; i++) ch_cfg[i] <= '0;
      glb_cfg <= '{roi_len_m1: 6'd63, roi_offset: 6'd0, roi_en: 1'b0,
                   fge_en: 1'b0, res_sel: 2'd3};
    end else if (!active) begin
      bitcnt <= '0;
    end else begin
      if (rise) begin
        bitcnt <= bitcnt + 1'b1;
        rx     <= {rx[29:0], mosi_s[1]};
        if (bitcnt == 6'd7) tx <= rdata_next();
        if (bitcnt == 6'd31 && !rx[30]) begin
          // rx[30] is the read flag, rx[29:23] the address, rx[22:0] + mosi the data
          if (int'(rx[29:23]) < N_CH)
            ch_cfg[rx[23+$clog2(N_CH)-1:23]] <= ch_cfg_t'({rx[22:0], mosi_s[1]});
          else if (int'(rx[29:23]) == N_CH)
            glb_cfg <= glb_cfg_t'({rx[22:0], mosi_s[1]});
        end
      end
      if (fall && bitcnt > 6'd8) tx <= {tx[22:0], 1'b0};
    end
  end

  // Register addressed by the first 7 received bits plus the incoming 8th bit.
  function automatic logic [23:0] rdata_next();
    logic [6:0] a;
    a = {rx[5:0], mosi_s[1]};
    if (int'(a) < N_CH) return 24'(ch_cfg[a[$clog2(N_CH)-1:0]]);
    else if (int'(a) == N_CH) return 24'(glb_cfg);
    else return '0;
  endfunction

  assign spi_miso = tx[23];
endmodule
