// Self-checking testbench of central_trigger: random hit and enable vectors;
// the central trigger must be the OR of the hits of enabled channels.
module tb_central_trigger;
  logic [15:0] local_hit, ch_en;
  logic central;
  int checks = 0, failures = 0, seen1 = 0, seen0 = 0;
  bit exp;

  central_trigger #(.N_CH(16)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      local_hit = (i % 3 == 0) ? 16'(1 << $urandom_range(0, 15)) : 16'($urandom & $urandom);
      ch_en = 16'($urandom);
      #1;
      exp = 0;
      for (int c = 0; c < 16; c++) if (local_hit[c] && ch_en[c]) exp = 1;
      checks++;
      if (central !== exp) begin
        failures++;
        $display("FAIL hits=%h en=%h", local_hit, ch_en);
      end
      if (exp) seen1++; else seen0++;
    end
    checks++;
    if (seen1 == 0 || seen0 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
