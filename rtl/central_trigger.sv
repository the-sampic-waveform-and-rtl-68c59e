// Central trigger of the chip. In this chip the central trigger is a plain OR:
// any enabled channel whose own discriminator fires raises the central trigger,
// which is distributed back to all channels; each channel decides in its own
// trigger logic whether it listens to it. Combinational: the output follows
// the local hits in the same cycle. The OR function follows the chip; the
// masking with the channel enables is this design's choice.
module central_trigger #(
  parameter int unsigned N_CH = 16
) (
  input  logic [N_CH-1:0] local_hit,
  input  logic [N_CH-1:0] ch_en,
  output logic            central
);
  assign central = |(local_hit & ch_en);
endmodule
