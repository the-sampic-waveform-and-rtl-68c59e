// Digital half of one channel's 64 Wilkinson ADCs: one 11-bit register per
// cell. `start` clears the "converted" marks at the beginning of a conversion;
// then, while `en` is high, each register copies the shared Gray counter the
// first time its comparator reports that the ramp has reached the cell. On
// `finish` a cell whose comparator never fired gets the full-scale code
// `max_gray`. The registers are kept afterwards and serve as the channel's
// readout buffer. Latching the Gray counter on the comparator edge follows
// the chip; the saturation rule is this design's choice.
module adc_latch_bank
  import sampic_pkg::ADC_W;
#(
  parameter int unsigned N_CELLS = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               en,
  input  logic [N_CELLS-1:0] cmp,
  input  logic [ADC_W-1:0]   count_gray,
  input  logic               finish,
  input  logic [ADC_W-1:0]   max_gray,
  output logic [ADC_W-1:0]   codes [N_CELLS]
);
  logic [N_CELLS-1:0] done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= '0;
      for (int i = 0; i < N_CELLS; i++) codes[i] <= '0;
    end else if (start) begin
      done <= '0;
    end else if (en) begin
      for (int i = 0; i < N_CELLS; i++) begin
        if (!done[i] && cmp[i]) begin
          codes[i] <= count_gray;
          done[i]  <= 1'b1;
        end else if (!done[i] && finish) begin
          codes[i] <= max_gray;
          done[i]  <= 1'b1;
        end
      end
    end
  end
endmodule
