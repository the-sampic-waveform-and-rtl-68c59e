// Self-checking testbench of dll_model: over several turns the sampled cell
// must advance by one per step, wrap from 63 to 0, the one-hot T/H vector must
// select exactly the current cell and `wrap` must be high only on cell 63.
module tb_dll_model;
  logic clk = 0, rst_n = 0;
  logic [5:0] wr_ptr;
  logic [63:0] th;
  logic wrap;
  int checks = 0, failures = 0, expect_ptr = 0, wraps = 0;

  dll_model #(.N_CELLS(64)) dut (.*);

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #0.1 check(wr_ptr == 0, "reset cell");
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      #0.1;
      check(int'(wr_ptr) == expect_ptr, "cell sequence");
      check(th == (64'd1 << expect_ptr), "one-hot T/H");
      check(wrap == (expect_ptr == 63), "wrap flag");
      if (wrap) wraps++;
      @(posedge clk);
      expect_ptr = (expect_ptr + 1) % 64;
    end
    check(wraps == 4, "four turns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
