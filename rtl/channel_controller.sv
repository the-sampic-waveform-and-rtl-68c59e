// Sampling and event state of one channel. In SAMPLING the channel's
// Track&Hold pulses are enabled and the analog memory records continuously.
// A trigger stops the sampling and, on the same clock edge, latches the
// coarse Gray timestamp and the index of the cell just written (the trigger
// cell); the channel is then in HOLD and asks for a conversion. When the
// conversion controller selects it, the channel is in CONVERT; at the end of
// the conversion the timestamp and trigger cell move to the buffer registers,
// `buf_full` is raised and the channel goes straight back to SAMPLING, so it
// is dead only while converting. `release` from the readout empties the
// buffer. A held event is offered for conversion (`ready`) only when the
// buffer is empty, because the ADC registers are that buffer (this rule is
// this design's choice; the sequence itself follows the chip).
module channel_controller
  import sampic_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              trig,
  input  logic [CELL_W-1:0] wr_ptr,
  input  logic [TS_W-1:0]   ts_gray,
  input  logic              conv_sel,
  input  logic              conv_done,
  input  logic              release_buf,
  output logic              sampling,
  output logic              pending,
  output logic              ready,
  output logic              buf_full,
  output logic [TS_W-1:0]   ts_buf,
  output logic [CELL_W-1:0] cell_buf
);
  typedef enum logic [1:0] {SAMPLING, HOLD, CONVERT} state_t;
  state_t            state;
  logic [TS_W-1:0]   ts_cap;
  logic [CELL_W-1:0] cell_cap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= SAMPLING;
      ts_cap   <= '0;
      cell_cap <= '0;
      ts_buf   <= '0;
      cell_buf <= '0;
      buf_full <= 1'b0;
    end else begin
      if (release_buf) buf_full <= 1'b0;
      unique case (state)
        SAMPLING: if (trig) begin
          ts_cap   <= ts_gray;
          cell_cap <= wr_ptr;
          state    <= HOLD;
        end
        HOLD: if (conv_sel) state <= CONVERT;
        CONVERT: if (conv_done) begin
          ts_buf   <= ts_cap;
          cell_buf <= cell_cap;
          buf_full <= 1'b1;
          state    <= SAMPLING;
        end
        default: state <= SAMPLING;
      endcase
    end
  end

  assign sampling = (state == SAMPLING);
  assign pending  = (state == HOLD);
  assign ready    = (state == HOLD) && !buf_full;

  // A channel is selected for conversion only when it offered itself.
  property p_sel_when_ready;
    @(posedge clk) disable iff (!rst_n) (conv_sel && state == SAMPLING) |-> 0;
  endproperty
  a_sel_when_ready: assert property (p_sel_when_ready);
endmodule
