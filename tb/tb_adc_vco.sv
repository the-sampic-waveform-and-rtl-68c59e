// Self-checking testbench of adc_vco: with the oscillator enabled a tick must
// come every DIV clocks, the first DIV clocks after enable; with it disabled
// no tick may appear.
module tb_adc_vco;
  localparam int DIV = 5;
  logic clk = 0, rst_n = 0, en = 0, tick;
  int checks = 0, failures = 0, cyc = 0, last = -1, nticks = 0, start_cyc = 0;

  adc_vco #(.DIV(DIV)) dut (.*);

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", msg, cyc); end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (10) begin @(posedge clk); #0.1 check(!tick, "no tick while off"); end
    for (int run = 0; run < 3; run++) begin
      @(negedge clk); en = 1; last = -1; start_cyc = cyc;
      repeat (DIV * 20 + run) begin
        @(posedge clk); cyc++;
        #0.1;
        if (tick) begin
          if (last < 0) check(cyc - start_cyc == DIV - 1, "first tick delay");
          else check(cyc - last == DIV, "tick period");
          last = cyc; nticks++;
        end
      end
      @(negedge clk); en = 0;
      repeat (7) begin @(posedge clk); cyc++; #0.1 check(!tick, "no tick after stop"); end
    end
    check(nticks >= 60, "ticks produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
