// Conversion sequencer shared by all channels (Wilkinson ramp ADCs). When the
// acquisition system requests a conversion (`start`) and at least one channel
// holds an event (`ready`), every such channel is selected at once
// (`conv_sel`, kept until the end). `start_pulse` clears the Gray counter,
// the ramps and the channels' latch flags. Then the sequence of the chip
// runs: the oscillator is started (`vco_en`), the selected channels'
// comparators are enabled, and the Gray counter and the ramps advance on each
// oscillator tick. After 2^n ticks for an n-bit conversion (n = 8 + res_sel,
// 1.6 us at 1.3 GHz for 11 bits) `finish` pulses for one clock, the oscillator
// stops and the channels return to sampling. Channels that trigger meanwhile
// wait for the next request (this design's choice).
module conversion_controller
  import sampic_pkg::ADC_W, sampic_pkg::adc_max;
#(
  parameter int unsigned N_CH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [N_CH-1:0]  ready,
  input  logic [1:0]       res_sel,
  input  logic             tick,
  input  logic [ADC_W-1:0] count_bin,
  output logic             start_pulse,
  output logic             vco_en,
  output logic             run,
  output logic             cnt_en,
  output logic [N_CH-1:0]  conv_sel,
  output logic             finish,
  output logic             busy,
  output logic [ADC_W-1:0] max_code,
  output logic [1:0]       res_conv
);
  typedef enum logic [1:0] {IDLE, RUN, FINISH} state_t;
  state_t state;
  logic [1:0] res_q;   // resolution frozen for the whole conversion

  assign max_code    = adc_max(res_q);
  assign res_conv    = res_q;
  assign start_pulse = (state == IDLE) && start && (|ready);
  assign run         = (state == RUN);
  assign vco_en      = (state == RUN);
  assign cnt_en      = run && tick && (count_bin != max_code);
  assign finish      = (state == FINISH);
  assign busy        = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      conv_sel <= '0;
      res_q    <= 2'd3;
    end else begin
      unique case (state)
        IDLE: if (start_pulse) begin
          conv_sel <= ready;
          res_q    <= res_sel;
          state    <= RUN;
        end
        RUN: if (tick && count_bin == max_code) state <= FINISH;
        FINISH: begin
          conv_sel <= '0;
          state    <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
