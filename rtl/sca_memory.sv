// Behavioural model of one channel's switched-capacitor analog memory (64
// three-switch cells; analog in the chip). The DLL's 64 Track&Hold pulses
// `th` are shared by all channels and gated here by the channel's `write_en`,
// as the chip disables T/H per channel. While sampling is enabled the cell
// whose T/H pulse is active tracks the input and holds it when the DLL moves
// on, so
// the memory is a circular buffer in which the oldest cell is overwritten
// after each turn. When the channel stops sampling (trigger) every cell keeps
// its held level until sampling resumes. Stored levels are the input codes
// themselves: no charge injection, noise or leakage is modelled. Timing: the
// cell whose `th` bit is set takes `vin` at the clock edge where `write_en` is
// high.
module sca_memory
  import sampic_pkg::volt_t;
#(
  parameter int unsigned N_CELLS = 64
) (
  input  logic                       clk,
  input  logic                       write_en,
  input  logic [N_CELLS-1:0]         th,
  input  volt_t                      vin,
  output volt_t                      cells [N_CELLS]
);
  always_ff @(posedge clk) begin
    for (int i = 0; i < N_CELLS; i++)
      if (write_en && th[i]) cells[i] <= vin;
  end
endmodule
