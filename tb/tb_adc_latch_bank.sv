// Self-checking testbench of adc_latch_bank. The testbench plays the rest of
// a Wilkinson conversion: random cell levels, its own binary counter k that
// advances on random ticks, comparators cmp[i] = (k >= level) and the Gray
// value of k. After `finish` every register must hold gray(min(level, max))
// for the chosen resolution; cells above full scale must hold the full-scale
// code. A second conversion with `en` low must leave the registers untouched.
module tb_adc_latch_bank;
  import sampic_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, en = 0, finish = 0;
  logic [63:0] cmp;
  logic [10:0] count_gray, max_gray;
  logic [10:0] codes [64];
  int lvl [64];
  int checks = 0, failures = 0, k, maxc, nsat;

  adc_latch_bank #(.N_CELLS(64)) dut (.*);

  always #1 clk = ~clk;

  function automatic logic [10:0] g(input int b);
    return 11'(b) ^ (11'(b) >> 1);
  endfunction

  always_comb for (int i = 0; i < 64; i++) cmp[i] = en && (k >= lvl[i]);
  assign count_gray = g(k);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    k = 0;
    for (int i = 0; i < 64; i++) lvl[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    nsat = 0;
    for (int r = 3; r >= 0; r--) begin
      maxc = (1 << (8 + r)) - 1;
      max_gray = g(maxc);
      for (int i = 0; i < 64; i++) lvl[i] = $urandom_range(0, maxc + 40);
      @(negedge clk); start = 1; k = 0;
      @(negedge clk); start = 0; en = 1;
      while (k < maxc) begin
        @(negedge clk);
        if ($urandom_range(0, 1) == 0) k++;
      end
      @(negedge clk); finish = 1;
      @(negedge clk); finish = 0; en = 0;
      for (int i = 0; i < 64; i++) begin
        check(codes[i] == g(lvl[i] > maxc ? maxc : lvl[i]), "converted code");
        if (lvl[i] > maxc) nsat++;
      end
    end
    check(nsat > 0, "saturation exercised");
    // a conversion this bank does not take part in
    begin
      logic [10:0] keep [64];
      keep = codes;
      @(negedge clk); start = 1; k = 0;
      @(negedge clk); start = 0;
      repeat (300) begin @(negedge clk); k++; end
      @(negedge clk); finish = 1;
      @(negedge clk); finish = 0;
      for (int i = 0; i < 64; i++) check(codes[i] == keep[i], "buffer kept");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
