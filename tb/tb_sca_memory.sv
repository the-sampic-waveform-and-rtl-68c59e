// Self-checking testbench of sca_memory: the one-hot T/H pulse turns like the DLL,
// the input is random, and sampling is stopped and restarted at random
// times. A reference array in the testbench is updated only while sampling;
// after every clock all 64 held levels must match it.
module tb_sca_memory;
  import sampic_pkg::*;
  logic clk = 0, write_en = 0;
  logic [5:0] wr_ptr = 0;
  logic [63:0] th;
  volt_t vin = 0;
  volt_t cells [64];
  volt_t model [64];
  int checks = 0, failures = 0, stops = 0;

  sca_memory #(.N_CELLS(64)) dut (.*);

  assign th = 64'd1 << wr_ptr;

  always #1 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every cell once so that both sides are initialised
    write_en = 1;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); wr_ptr = 6'(i); vin = 12'($urandom); model[i] = vin;
    end
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      if (n % 97 == 0) begin
        write_en = ~write_en;
        if (!write_en) stops++;
      end
      wr_ptr = wr_ptr + 1'b1;
      vin = 12'($urandom);
      @(posedge clk);
      if (write_en) model[wr_ptr] = vin;
      #0.1;
      for (int i = 0; i < 64; i++) begin
        checks++;
        if (cells[i] !== model[i]) begin
          failures++;
          if (failures < 10) $display("FAIL cell %0d %0d != %0d", i, cells[i], model[i]);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (stops < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
