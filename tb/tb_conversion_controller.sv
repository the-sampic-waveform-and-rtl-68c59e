// Self-checking testbench of conversion_controller. The testbench supplies
// oscillator ticks every 3 clocks while `vco_en` is high and keeps the ADC
// counter itself (cleared by `start_pulse`, advanced by `cnt_en`). For 11-,
// 8- and 9-bit conversions it checks that exactly the ready channels are
// selected, that `finish` comes after exactly 2^n ticks, that the counter
// ends at 2^n - 1, and that a request with no ready channel starts nothing.
module tb_conversion_controller;
  import sampic_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, tick;
  logic [15:0] ready = 0, conv_sel;
  logic [1:0] res_sel = 3;
  logic [10:0] count_bin = 0, max_code;
  logic start_pulse, vco_en, run, cnt_en, finish, busy;
  logic [1:0] res_conv;
  int checks = 0, failures = 0, ph = 0, nt;

  conversion_controller #(.N_CH(16)) dut (.*);

  always #1 clk = ~clk;
  assign tick = vco_en && (ph == 2);
  always @(posedge clk) begin
    ph <= vco_en ? (ph + 1) % 3 : 0;
    if (start_pulse) count_bin <= '0;
    else if (cnt_en) count_bin <= count_bin + 1'b1;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rs [3] = '{3, 0, 1};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; ready = 0;
    @(negedge clk); start = 0;
    check(!busy && !vco_en, "no conversion without events");
    foreach (rs[j]) begin
      logic [15:0] r;
      r = 16'($urandom) | 16'h0001;
      @(negedge clk); res_sel = 2'(rs[j]); ready = r; start = 1;
      @(negedge clk); start = 0; ready = 16'hffff;   // later arrivals wait
      check(busy && conv_sel == r, "selected channels");
      nt = 0;
      while (!finish) begin
        @(posedge clk); if (tick) nt++;
        @(negedge clk);
      end
      check(nt == (1 << (8 + rs[j])), "conversion length in ticks");
      check(count_bin == 11'((1 << (8 + rs[j])) - 1), "final count");
      check(conv_sel == r, "selection held to the end");
      @(negedge clk);
      check(!busy && conv_sel == '0 && !vco_en, "idle after finish");
      ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
