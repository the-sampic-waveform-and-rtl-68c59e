// Rotating-priority arbiter used to choose which channel is read next, so
// that a busy channel cannot starve the others. The grant goes to the first
// requester found at or after the priority pointer, scanning circularly.
// `advance` (with a valid grant) moves the pointer just past the granted
// requester. Grant outputs are combinational; the pointer is a register. The
// rotating priority follows the chip; the pointer rule is this design's
// choice.
module rr_arbiter #(
  parameter int unsigned N = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic                 gnt_valid,
  output logic [$clog2(N)-1:0] gnt_idx
);
  localparam int unsigned IW = $clog2(N);
  logic [IW-1:0] ptr;

  always_comb begin
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    for (int k = N - 1; k >= 0; k--) begin
      logic [IW:0] j;
      j = (IW+1)'((int'(ptr) + k) % N);
      if (req[j[IW-1:0]]) begin
        gnt_valid = 1'b1;
        gnt_idx   = j[IW-1:0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (advance && gnt_valid)
      ptr <= (gnt_idx == IW'(N - 1)) ? '0 : gnt_idx + 1'b1;
  end
endmodule
