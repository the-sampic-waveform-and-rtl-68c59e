// Self-checking testbench of gray_counter (12-bit timestamp configuration).
// A reference binary count is kept in the testbench; each cycle the Gray
// output must equal ref ^ (ref >> 1), the binary output must equal ref, and
// two successive Gray values may differ in at most one bit. Enable is random
// and a synchronous clear is applied midway. The counter is run past its
// wrap-around (4096 steps).
module tb_gray_counter;
  localparam int W = 12;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [W-1:0] gray, bin, ref_cnt, prev_gray;
  int checks = 0, failures = 0, wraps = 0;

  gray_counter #(.WIDTH(W)) dut (.*);

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    #40000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_cnt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    prev_gray = '0;
    for (int i = 0; i < 9000; i++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      clr = (i == 2500);
      @(posedge clk);
      if (clr) ref_cnt = '0;
      else if (en) begin
        if (ref_cnt == '1) wraps++;
        ref_cnt = ref_cnt + 1'b1;
      end
      #0.1;
      check(bin == ref_cnt, "binary value");
      check(gray == (ref_cnt ^ (ref_cnt >> 1)), "gray value");
      if (!clr) check($countones(gray ^ prev_gray) <= 1, "one bit change");
      prev_gray = gray;
    end
    check(wraps >= 1, "wrap-around exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
