// Behavioural model of a channel discriminator with its 10-bit threshold DAC
// (analog in the chip). The output is high while the input is above the
// threshold. The threshold comes from the channel's DAC or, when `use_ext` is
// set, from the external threshold input, as the chip allows. The DAC maps its
// code onto the 12-bit level scale by a factor of 4 (full scale ~1 V); that
// transfer, and the absence of noise and hysteresis, are this model's choices.
// Purely combinational.
module discriminator
  import sampic_pkg::*;
(
  input  volt_t             vin,
  input  logic [DAC_W-1:0]  dac_code,
  input  volt_t             vth_ext,
  input  logic              use_ext,
  output logic              out
);
  volt_t vth;
  assign vth = use_ext ? vth_ext : {dac_code, 2'b00};
  assign out = (vin > vth);
endmodule
