// Gray-code counter. The chip uses two of them: the common 12-bit coarse
// timestamp counter, advanced once per DLL turn, and the common 11-bit counter
// of the Wilkinson ADCs, clocked by the 1.3 GHz oscillator. A binary register
// counts and a second register holds its Gray encoding, so the distributed
// value changes by one bit per step and can be latched at any moment by a
// channel. Interface: synchronous clear `clr` (priority) and count enable `en`;
// `gray` and `bin` are both registered and change on the same edge.
// The Gray coding and widths follow the chip; the internal structure is this
// design's choice.
module gray_counter #(
  parameter int unsigned WIDTH = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  output logic [WIDTH-1:0] gray,
  output logic [WIDTH-1:0] bin
);
  logic [WIDTH-1:0] nxt;
  assign nxt = bin + WIDTH'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin  <= '0;
      gray <= '0;
    end else if (clr) begin
      bin  <= '0;
      gray <= '0;
    end else if (en) begin
      bin  <= nxt;
      gray <= nxt ^ (nxt >> 1);
    end
  end
endmodule
