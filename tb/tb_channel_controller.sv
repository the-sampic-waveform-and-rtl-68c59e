// Self-checking testbench of channel_controller: a directed sequence of
// events. A trigger stops sampling and latches timestamp and cell on that
// edge; further triggers are ignored while held; selection and end of
// conversion move the event into the buffer and restart sampling at once; a
// second event held while the buffer is full is not offered for conversion
// until the readout releases the buffer.
module tb_channel_controller;
  import sampic_pkg::*;
  logic clk = 0, rst_n = 0, trig = 0, conv_sel = 0, conv_done = 0, release_buf = 0;
  logic [5:0] wr_ptr = 0;
  logic [11:0] ts_gray = 0;
  logic sampling, pending, ready, buf_full;
  logic [11:0] ts_buf;
  logic [5:0] cell_buf;
  int checks = 0, failures = 0;

  channel_controller dut (.*);

  always #1 clk = ~clk;
  always @(posedge clk) begin wr_ptr <= wr_ptr + 1'b1; if (wr_ptr == 63) ts_gray <= ts_gray + 1'b1; end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic event_at(input int cyc, output logic [5:0] c, output logic [11:0] t);
    repeat (cyc) @(negedge clk);
    trig = 1; c = wr_ptr; t = ts_gray;
    @(negedge clk); trig = 0;
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] c1, c2;
    logic [11:0] t1, t2;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #0.1 check(sampling && !pending && !ready && !buf_full, "idle after reset");
    event_at(100, c1, t1);
    check(!sampling && pending && ready, "held after trigger");
    // extra trigger while held is ignored
    trig = 1; @(negedge clk); trig = 0;
    conv_sel = 1; @(negedge clk);
    check(!sampling && !pending && !ready, "converting");
    repeat (20) @(negedge clk);
    conv_done = 1; @(negedge clk); conv_done = 0; conv_sel = 0;
    check(sampling && buf_full, "sampling again with full buffer");
    check(ts_buf == t1 && cell_buf == c1, "first event latched");
    event_at(37, c2, t2);
    check(pending && !ready, "second event waits for buffer");
    repeat (5) @(negedge clk);
    release_buf = 1; @(negedge clk); release_buf = 0;
    check(!buf_full && ready, "offered after release");
    check(ts_buf == t1 && cell_buf == c1, "buffer unchanged until next conversion");
    conv_sel = 1; @(negedge clk); repeat (3) @(negedge clk);
    conv_done = 1; @(negedge clk); conv_done = 0; conv_sel = 0;
    check(buf_full && ts_buf == t2 && cell_buf == c2, "second event latched");
    check(c1 != c2 || t1 != t2, "distinct events");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
