// Trigger logic of one channel. The discriminator output is sampled and its
// selected edge (rising or falling) forms the local hit. The trigger is the OR
// of the enabled sources: local hit, rising edge of the external trigger and
// the central OR trigger. It is suppressed when the channel is disabled, and,
// when the Fast Global Enable option is on, while the FGE input is low. The
// result can be delayed by 0, 1 or 2 post-trigger units of PT_UNIT clocks
// (about 1 ns each in the chip; 6 DLL steps at 6.4 GS/s) before it stops the
// sampling. Timing: `local_hit` is combinational from the registered
// discriminator history; `trig` is registered, so a hit at edge n gives `trig`
// after edge n+1 (plus the delay). Source selection, edge choice, disable, FGE
// and the three delays follow the chip; the exact FGE gating and the edge
// detection of the external trigger are this design's choices.
module channel_trigger
  import sampic_pkg::*;
#(
  parameter int unsigned PT_UNIT = 6
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    disc,
  input  ch_cfg_t cfg,
  input  logic    ext_trig,
  input  logic    central,
  input  logic    fge,
  input  logic    fge_en,
  output logic    local_hit,
  output logic    trig
);
  logic disc_q, disc_qq, ext_q, ext_qq;
  logic src, src_d;
  logic [2*PT_UNIT:1] dly;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      disc_q <= 1'b0; disc_qq <= 1'b0; ext_q <= 1'b0; ext_qq <= 1'b0;
    end else begin
      disc_q <= disc; disc_qq <= disc_q; ext_q <= ext_trig; ext_qq <= ext_q;
    end
  end

  assign local_hit = cfg.enable &
                     (cfg.falling ? (disc_qq & ~disc_q) : (disc_q & ~disc_qq));

  assign src = cfg.enable & (~fge_en | fge) &
               ((cfg.sel_local & local_hit) |
                (cfg.sel_ext & ext_q & ~ext_qq) |
                (cfg.sel_central & central));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dly <= '0;
    else        dly <= {dly[2*PT_UNIT-1:1], src};
  end

  always_comb begin
    unique case (cfg.ptdelay)
      2'd0:    src_d = src;
      2'd1:    src_d = dly[PT_UNIT];
      default: src_d = dly[2*PT_UNIT];
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) trig <= 1'b0;
    else        trig <= src_d;
  end
endmodule
