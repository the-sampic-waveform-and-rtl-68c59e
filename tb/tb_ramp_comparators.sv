// Self-checking testbench of ramp_comparators: for each resolution (8..11
// bits) random cell levels are loaded, the ramp is cleared and run on
// irregular ticks. The testbench keeps its own ramp value k * 2^(12-n) after
// k ticks; every comparator must equal (ramp >= level) while enabled and be
// low while disabled. It also checks that after 2^n ticks every comparator
// has fired (the ramp spans the full range).
module tb_ramp_comparators;
  import sampic_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, run = 0, tick = 0, cmp_en = 0;
  logic [1:0] res_sel = 0;
  volt_t cells [64];
  logic [63:0] cmp;
  int checks = 0, failures = 0, k;

  ramp_comparators #(.N_CELLS(64)) dut (.*);

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) cells[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      @(negedge clk);
      res_sel = 2'(r);
      for (int i = 0; i < 64; i++) cells[i] = 12'($urandom);
      cells[0] = 12'hfff; cells[1] = 12'h000;
      clr = 1; cmp_en = 0;
      @(negedge clk);
      clr = 0; run = 1; k = 0;
      #0.1 check(cmp == '0, "comparators off while disabled");
      cmp_en = 1;
      while (k < (1 << (8 + r))) begin
        tick = ($urandom_range(0, 2) == 0);
        @(posedge clk);
        if (tick) k++;
        #0.1;
        for (int i = 0; i < 64; i++)
          check(cmp[i] == (k * (1 << (4 - r)) >= int'(cells[i])), "comparator");
        @(negedge clk);
      end
      tick = 0; run = 0;
      #0.1 check(cmp == '1, "full range covered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
