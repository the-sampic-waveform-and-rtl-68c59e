// Self-checking testbench of spi_config. A mode-0 SPI master in the testbench
// (SCLK = core clock / 8) writes random values to all 16 channel registers and
// to the global register, then reads every register back over MISO. The
// decoded register outputs must equal what was written, the read-back words
// must match, and reset values must be as documented. A write to an unused
// address must change nothing.
module tb_spi_config;
  import sampic_pkg::*;
  logic clk = 0, rst_n = 0, spi_sclk = 0, spi_mosi = 0, spi_cs_n = 1, spi_miso;
  ch_cfg_t  ch_cfg [16];
  glb_cfg_t glb_cfg;
  logic [23:0] wrote [17];
  int checks = 0, failures = 0;

  spi_config #(.N_CH(16)) dut (.*);

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic xfer(input logic [31:0] fout, output logic [23:0] din);
    din = '0;
    spi_cs_n = 0;
    repeat (8) @(negedge clk);
    for (int b = 31; b >= 0; b--) begin
      spi_mosi = fout[b];
      repeat (4) @(negedge clk);
      spi_sclk = 1;
      if (b < 24) din = {din[22:0], spi_miso};
      repeat (4) @(negedge clk);
      spi_sclk = 0;
    end
    repeat (8) @(negedge clk);
    spi_cs_n = 1;
    repeat (8) @(negedge clk);
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] rd;
    repeat (4) @(negedge clk);
    rst_n = 1;
    check(glb_cfg.res_sel == 2'd3 && !glb_cfg.roi_en && !glb_cfg.fge_en, "global reset value");
    check(ch_cfg[5] == '0, "channel reset value");
    for (int a = 0; a <= 16; a++) begin
      wrote[a] = (a < 16) ? 24'($urandom & 32'h3ffff) : 24'($urandom & 32'hffff);
      xfer({1'b0, 7'(a), wrote[a]}, rd);
    end
    xfer({1'b0, 7'd100, 24'hffffff}, rd);
    for (int a = 0; a < 16; a++) check(24'(ch_cfg[a]) == wrote[a], "channel register");
    check(24'(glb_cfg) == wrote[16], "global register");
    for (int a = 0; a <= 16; a++) begin
      xfer({1'b1, 7'(a), 24'h0}, rd);
      check(rd == wrote[a], "read back");
    end
    check(ch_cfg[3].dac == wrote[3][9:0] && ch_cfg[3].enable == wrote[3][17], "field layout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
