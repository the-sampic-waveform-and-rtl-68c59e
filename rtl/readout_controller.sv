// Readout of converted events on the 12-bit parallel bus, one channel per
// frame, driven by the Read level (`rd`) and the readout clock RCk (here the
// clock enable `rck_ce`). Among the channels whose buffer is full, a
// rotating-priority arbiter picks the next one. A frame is 4 header words
// followed by the cells, one word per RCk period while Read is high:
//   W0 = {4'b1000, channel[3:0], res_sel[1:0], roi_en, 1'b0}
//   W1 = coarse timestamp, binary
//   W2 = {6'b0, trigger cell index}
//   W3 = {first cell index, number of cells - 1}
//   Wk = {1'b0, 11-bit cell code, binary}, cells first, first+1, ... (mod 64)
// All 64 cells are sent from cell 0 or, in region-of-interest mode, roi_len
// cells from (trigger cell + roi_offset). A frame of n cells takes 4 + n RCk
// periods, i.e. 25 ns + 6.25 ns per cell at 160 MHz. `release_buf` pulses with
// the last word and frees the channel's buffer. Outputs change on RCk edges
// and hold between them. The content of the frame (channel, timestamp,
// trigger cell, cells) and the rotating priority follow the chip; the word
// layout, the Gray decoding on chip and the start of a full readout at cell 0
// are this design's choices.
module readout_controller
  import sampic_pkg::glb_cfg_t, sampic_pkg::TS_W, sampic_pkg::CELL_W, sampic_pkg::ADC_W,
         sampic_pkg::BUS_W, sampic_pkg::N_CELLS, sampic_pkg::gray2bin_ts, sampic_pkg::gray2bin_adc;
#(
  parameter int unsigned N_CH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rd,
  input  logic              rck_ce,
  input  glb_cfg_t          cfg,
  input  logic [N_CH-1:0]   buf_full,
  input  logic [TS_W-1:0]   ts_gray  [N_CH],
  input  logic [CELL_W-1:0] trig_cell[N_CH],
  output logic [$clog2(N_CH)-1:0] rd_ch,
  output logic [CELL_W-1:0] rd_cell,
  input  logic [ADC_W-1:0]  rd_code,
  output logic [BUS_W-1:0]  bus_data,
  output logic              bus_valid,
  output logic              bus_last,
  output logic [N_CH-1:0]   release_buf
);
  localparam int unsigned CHW = $clog2(N_CH);
  typedef enum logic [1:0] {IDLE, HDR, DATA} state_t;

  state_t            state;
  logic [1:0]        hidx;
  logic [CHW-1:0]    ch;
  logic [CELL_W-1:0] first, nm1, k, tcell;
  logic [TS_W-1:0]   ts;
  logic              gnt_valid, advance, step, last;
  logic [CHW-1:0]    gnt_idx;

  rr_arbiter #(.N(N_CH)) u_arb (
    .clk, .rst_n, .req(buf_full), .advance,
    .gnt_valid, .gnt_idx
  );

  assign step    = rck_ce && rd;
  assign advance = step && (state == IDLE);
  assign rd_ch   = ch;
  assign rd_cell = first + k;
  assign last    = (state == DATA) && (k == nm1);

  always_comb begin
    release_buf = '0;
    if (step && last) release_buf[ch] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; hidx <= '0; ch <= '0; first <= '0; nm1 <= '0; k <= '0;
      tcell <= '0; ts <= '0;
      bus_data <= '0; bus_valid <= 1'b0; bus_last <= 1'b0;
    end else if (rck_ce) begin
      bus_valid <= 1'b0;
      bus_last  <= 1'b0;
      if (rd) begin
        unique case (state)
          IDLE: if (gnt_valid) begin
            ch    <= gnt_idx;
            ts    <= ts_gray[gnt_idx];
            tcell <= trig_cell[gnt_idx];
            first <= cfg.roi_en ? trig_cell[gnt_idx] + cfg.roi_offset : '0;
            nm1   <= cfg.roi_en ? cfg.roi_len_m1 : CELL_W'(N_CELLS - 1);
            k     <= '0;
            hidx  <= 2'd1;
            bus_data  <= {4'b1000, 4'(gnt_idx), cfg.res_sel, cfg.roi_en, 1'b0};
            bus_valid <= 1'b1;
            state <= HDR;
          end
          HDR: begin
            unique case (hidx)
              2'd1:    bus_data <= gray2bin_ts(ts);
              2'd2:    bus_data <= {6'b0, tcell};
              default: bus_data <= {first, nm1};
            endcase
            bus_valid <= 1'b1;
            hidx <= hidx + 1'b1;
            if (hidx == 2'd3) state <= DATA;
          end
          DATA: begin
            bus_data  <= {1'b0, gray2bin_adc(rd_code)};
            bus_valid <= 1'b1;
            k <= k + 1'b1;
            if (last) begin
              bus_last <= 1'b1;
              state    <= IDLE;
            end
          end
          default: state <= IDLE;
        endcase
      end
    end
  end

  // The channel being read keeps its buffer until the last word.
  a_buf_held: assert property (@(posedge clk) disable iff (!rst_n)
    (state != IDLE) |-> buf_full[ch]);
endmodule
