// Behavioural model of one channel's ramp generator and its 64 cell
// comparators (analog in the chip), the analog half of the Wilkinson ADC.
// The ramp is cleared with `clr` and rises by one step on every ADC clock tick
// while `run` is high. Its slope is set by the resolution so that it spans the
// 12-bit level range in 2^n ticks for an n-bit conversion (n = 8 + res_sel):
// one step is 2^(12-n) codes. Comparator i is high while the comparators are
// enabled and the ramp has reached the level held in cell i. The tunable
// slope follows the chip; the exact scaling is this model's choice.
module ramp_comparators
  import sampic_pkg::volt_t, sampic_pkg::VW;
#(
  parameter int unsigned N_CELLS = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         run,
  input  logic         tick,
  input  logic         cmp_en,
  input  logic [1:0]   res_sel,
  input  volt_t        cells [N_CELLS],
  output logic [N_CELLS-1:0] cmp
);
  logic [VW:0] ramp;    // one bit of headroom above the level range
  logic [VW:0] step;

  assign step = (VW+1)'(1) << (VW - 8 - int'(res_sel));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           ramp <= '0;
    else if (clr)         ramp <= '0;
    else if (run && tick) ramp <= ramp + step;
  end

  always_comb begin
    for (int i = 0; i < N_CELLS; i++)
      cmp[i] = cmp_en && (ramp >= {1'b0, cells[i]});
  end
endmodule
