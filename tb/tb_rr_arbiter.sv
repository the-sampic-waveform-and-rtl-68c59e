// Self-checking testbench of rr_arbiter: random request vectors and advance
// strobes. The testbench keeps its own priority pointer; the grant must be
// the first requester at or after it, circularly. It also checks fairness:
// with all channels requesting, 16 advances grant each channel once.
module tb_rr_arbiter;
  logic clk = 0, rst_n = 0, advance = 0, gnt_valid;
  logic [15:0] req = 0;
  logic [3:0] gnt_idx;
  int checks = 0, failures = 0, ptr = 0, exp;
  int seen [16];

  rr_arbiter #(.N(16)) dut (.*);

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      req = (n % 5 == 0) ? 16'(1 << $urandom_range(0, 15)) : 16'($urandom & $urandom);
      if (n % 50 == 0) req = 0;
      advance = 1'($urandom);
      #0.1;
      exp = -1;
      for (int k = 0; k < 16; k++) if (exp < 0 && req[(ptr + k) % 16]) exp = (ptr + k) % 16;
      check(gnt_valid == (exp >= 0), "grant valid");
      if (exp >= 0) check(int'(gnt_idx) == exp, "rotating priority");
      @(posedge clk);
      if (advance && exp >= 0) ptr = (exp + 1) % 16;
    end
    foreach (seen[i]) seen[i] = 0;
    @(negedge clk); req = '1; advance = 1;
    repeat (16) begin #0.1 seen[gnt_idx]++; @(negedge clk); end
    foreach (seen[i]) check(seen[i] == 1, "fair rotation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
