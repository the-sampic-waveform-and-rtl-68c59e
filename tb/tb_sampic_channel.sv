// Self-checking testbench of one complete channel (sampic_channel). The
// testbench plays the DLL (cell = cycle mod 64, one-hot T/H pulse), the
// timestamp counter (cycle / 64, Gray coded) and the conversion controller
// (start pulse, selection, ticks every 2 clocks, Gray counter, finish). A triangular pulse
// crosses the DAC threshold at a known cycle c0; with post-trigger delay d
// the memory must stop at cycle c0 + 2 + d*PT_UNIT, which gives the expected
// trigger cell and timestamp. After conversion every cell code must equal
// the ramp ADC result of the level the testbench applied when that cell was
// last written: min(ceil(level / 2^(12-n)), 2^n - 1), Gray coded. Two events
// are run: 11 bits with delay 1 on a rising edge, 8 bits with delay 2 on a
// falling edge.
module tb_sampic_channel;
  import sampic_pkg::*;
  localparam int PT = 6;
  logic clk = 0, rst_n = 0;
  volt_t vin, vth_ext = 0;
  ch_cfg_t cfg;
  logic [1:0] res_sel = 3;
  logic ext_trig = 0, central = 0, fge = 0, fge_en = 0, local_hit;
  logic [5:0] wr_ptr;
  logic [63:0] th;
  logic [11:0] ts_gray;
  logic conv_start = 0, conv_sel = 0, conv_run = 0, adc_tick = 0, conv_finish = 0, release_buf = 0;
  logic [10:0] count_gray, max_gray;
  logic sampling, pending, ready, buf_full;
  logic [11:0] ts_buf;
  logic [5:0] cell_buf;
  logic [10:0] codes [64];
  int checks = 0, failures = 0;
  int cyc = 0, pulse_t = 100000, cnt = 0;
  volt_t hist [int];

  sampic_channel #(.PT_UNIT(PT)) dut (.*);

  always #1 clk = ~clk;

  function automatic volt_t level(input int k);
    int d;
    d = (k > pulse_t) ? k - pulse_t : pulse_t - k;
    return (d >= 10) ? volt_t'(300) : volt_t'(300 + (10 - d) * 300);
  endfunction

  function automatic logic [11:0] g12(input int b);
    return 12'(b) ^ (12'(b) >> 1);
  endfunction

  function automatic logic [10:0] g11(input int b);
    return 11'(b) ^ (11'(b) >> 1);
  endfunction

  assign wr_ptr  = 6'(cyc % 64);
  assign th      = 64'd1 << wr_ptr;
  assign ts_gray = g12(cyc / 64);
  assign count_gray = g11(cnt);

  // cycle counter = index of the coming clock edge; input applied per edge
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;
  always @(negedge clk) begin vin = level(cyc); hist[cyc] = vin; end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic convert(input int nbits);
    int maxc;
    maxc = (1 << nbits) - 1;
    max_gray = g11(maxc);
    @(negedge clk); conv_start = 1;
    @(negedge clk); conv_start = 0; conv_sel = 1; conv_run = 1; cnt = 0;
    forever begin
      @(negedge clk); adc_tick = 1;
      if (cnt == maxc) break;
      @(posedge clk); cnt = cnt + 1;
      @(negedge clk); adc_tick = 0;
    end
    @(negedge clk); adc_tick = 0; conv_run = 0; conv_finish = 1;
    @(negedge clk); conv_finish = 0; conv_sel = 0;
  endtask

  task automatic run_event(input int nbits, input bit falling, input int d, input int t0);
    int c0, s, maxc, step, exp_code, lastk;
    pulse_t = t0;
    cfg.falling = falling; cfg.ptdelay = 2'(d);
    res_sel = 2'(nbits - 8);
    // expected threshold crossing from the applied waveform
    c0 = t0 - 20;
    if (!falling) while (!(int'(level(c0)) > 4 * int'(cfg.dac))) c0++;
    else begin
      while (!(int'(level(c0)) > 4 * int'(cfg.dac))) c0++;
      while (int'(level(c0)) > 4 * int'(cfg.dac)) c0++;
    end
    s = c0 + 2 + d * PT;
    wait (pending);
    @(negedge clk);
    convert(nbits);
    check(buf_full && sampling, "event buffered, channel re-armed");
    check(int'(cell_buf) == s % 64, "trigger cell");
    check(ts_buf == g12(s / 64), "coarse timestamp");
    maxc = (1 << nbits) - 1;
    step = 1 << (12 - nbits);
    for (int i = 0; i < 64; i++) begin
      lastk = s - ((s - i) % 64 + 64) % 64;
      exp_code = (int'(hist[lastk]) + step - 1) / step;
      if (exp_code > maxc) exp_code = maxc;
      check(codes[i] == g11(exp_code), "cell code");
    end
    @(negedge clk); release_buf = 1;
    @(negedge clk); release_buf = 0;
    check(!buf_full, "released");
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '{enable: 1'b1, sel_local: 1'b1, sel_ext: 1'b0, sel_central: 1'b0, falling: 1'b0,
            ptdelay: 2'd1, ext_thr: 1'b0, dac: 10'd400};
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_event(11, 1'b0, 1, 500);
    run_event(8, 1'b1, 2, 30000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
