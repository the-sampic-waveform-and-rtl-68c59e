// Behavioural model of the 64-step DLL (not synthesizable as a DLL: the real
// block is an analog delay line servo-locked on the timestamp clock by a phase
// detector and charge pump). Once locked, the DLL hands the Track&Hold pulse
// from one cell to the next every 1/64 of the timestamp clock period, and cell
// 63 is followed seamlessly by cell 0. This model represents that locked
// behaviour on a clock whose period is one DLL step: `wr_ptr` is the cell
// being sampled, `th` its one-hot T/H pulse, and `wrap` is high on the last
// cell, i.e. one step before the timestamp clock edge. Lock acquisition and
// the low-speed mode are not modelled.
module dll_model #(
  parameter int unsigned N_CELLS = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  output logic [$clog2(N_CELLS)-1:0] wr_ptr,
  output logic [N_CELLS-1:0]         th,
  output logic                       wrap
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wr_ptr <= '0;
    else if (wrap) wr_ptr <= '0;
    else wr_ptr <= wr_ptr + 1'b1;
  end

  assign wrap = (wr_ptr == ($clog2(N_CELLS))'(N_CELLS - 1));

  always_comb begin
    th = '0;
    th[wr_ptr] = 1'b1;
  end
endmodule
