// Self-checking testbench of the discriminator model: random input levels,
// DAC codes and external thresholds; the output must be high exactly when
// the input exceeds 4 x DAC code (internal) or the external threshold.
module tb_discriminator;
  import sampic_pkg::*;
  volt_t vin, vth_ext;
  logic [9:0] dac_code;
  logic use_ext, out;
  int checks = 0, failures = 0, ones = 0;
  int thr;

  discriminator dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      vin = 12'($urandom); vth_ext = 12'($urandom);
      dac_code = 10'($urandom); use_ext = 1'($urandom);
      if (i % 7 == 0) vin = use_ext ? vth_ext : {dac_code, 2'b00};  // exactly at threshold
      #1;
      thr = use_ext ? int'(vth_ext) : int'(dac_code) * 4;
      checks++;
      if (out !== (int'(vin) > thr)) begin
        failures++;
        $display("FAIL vin=%0d thr=%0d out=%0b", vin, thr, out);
      end
      ones += int'(out);
    end
    checks++;
    if (ones == 0 || ones == 2000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
