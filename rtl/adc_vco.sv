// Behavioural model of the on-chip 1.3 GHz voltage-controlled oscillator that
// clocks the Wilkinson ADC counter (analog in the chip). It runs only while
// `en` is high, which is how the conversion sequence starts and stops it.
// Seen from the model clock (one DLL step, 6.4 GS/s by default) it produces a
// one-cycle `tick` every DIV clocks (DIV = 5 gives 1.28 GHz); the first tick
// is high in the DIV-th clock cycle counted from the one in which `en` rises.
// Frequency tuning is not modelled.
module adc_vco #(
  parameter int unsigned DIV = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic tick
);
  logic [$clog2(DIV+1)-1:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     phase <= '0;
    else if (!en)   phase <= '0;
    else if (tick)  phase <= '0;
    else            phase <= phase + 1'b1;
  end

  assign tick = en && (phase == ($clog2(DIV+1))'(DIV - 1));
endmodule
