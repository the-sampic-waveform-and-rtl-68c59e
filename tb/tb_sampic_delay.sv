// Workload testbench: time difference between two pulses, the measurement
// used to characterise the chip (pulse pairs 2.5 ns to 10 us apart). The
// full chip model runs at its default parameters (6.4 GS/s step clock,
// 1.28 GHz ADC oscillator, 160 MHz RCk). Channels 0 and 1 self-trigger on two
// identical triangular pulses whose delay has a fractional-sample part. Each
// event is converted and read out; the testbench then rebuilds the time of
// every cell from the frame (timestamp * 64 + cell position relative to the
// trigger cell) and interpolates the 50 % crossing of the leading edge
// between the two samples around it. The measured delay must match the
// applied one to within a fraction of a sample (the ADC step is the only error
// source in this noiseless model). One delay is run with each ADC resolution
// (11, 10, 9, 8 bits); each conversion must last 2^n oscillator periods.
module tb_sampic_delay;
  import sampic_pkg::*;
  localparam int VDIV = 5, RCKDIV = 40, BASE = 300, AMP = 2400, HALFW = 10;

  logic clk = 0, rst_n = 0;
  volt_t vin [16];
  volt_t vth_ext = 12'd0;
  logic ext_trig = 0, fge = 1, spi_sclk = 0, spi_mosi = 0, spi_cs_n = 1, spi_miso;
  logic conv_start = 0, rd = 0, rck_ce = 0;
  logic [11:0] bus_data;
  logic bus_valid, bus_last, flag_trig, flag_data, conv_busy;

  sampic_top dut (.*);

  int checks = 0, failures = 0, cyc = 0, rck_cnt = 0;
  real pt [2];                // pulse peak times, in samples
  logic [12:0] words [$];

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", msg, cyc); end
  endtask

  function automatic int level(input int ch, input int k);
    real d;
    if (ch > 1) return BASE;
    d = (k > pt[ch]) ? k - pt[ch] : pt[ch] - k;
    return (d >= HALFW) ? BASE : BASE + int'($floor(AMP * (1.0 - d / HALFW)));
  endfunction

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;
  always @(negedge clk) begin
    for (int c = 0; c < 16; c++) vin[c] = volt_t'(level(c, cyc));
    rck_cnt = (rck_cnt + 1) % RCKDIV;
    rck_ce = (rck_cnt == 0);
  end

  initial forever begin
    @(posedge clk);
    if (rck_ce) begin
      #0.1;
      if (bus_valid) words.push_back({bus_last, bus_data});
    end
  end

  task automatic spi_write(input int addr, input logic [23:0] data);
    logic [31:0] f;
    f = {1'b0, 7'(addr), data};
    spi_cs_n = 0;
    repeat (8) @(negedge clk);
    for (int b = 31; b >= 0; b--) begin
      spi_mosi = f[b];
      repeat (4) @(negedge clk); spi_sclk = 1;
      repeat (4) @(negedge clk); spi_sclk = 0;
    end
    repeat (8) @(negedge clk);
    spi_cs_n = 1;
    repeat (8) @(negedge clk);
  endtask

  // Read one frame; return the 50 % leading-edge time in samples.
  task automatic read_frame(input int nbits, output int ch, output real t50);
    logic [12:0] f [$];
    int s, tcell, step, n;
    real tk [64], v [64], half;
    f.delete();
    forever begin
      wait (words.size() > 0);
      f.push_back(words.pop_front());
      if (f[$][12]) break;
    end
    ch = int'(f[0][7:4]);
    tcell = int'(f[2][5:0]);
    s = int'(f[1][11:0]) * 64 + tcell;
    n = int'(f[3][5:0]) + 1;
    check(n == 64 && f.size() == 68, "full frame");
    step = 1 << (12 - nbits);
    // oldest sample first: cell tcell+1 ... tcell
    for (int j = 0; j < 64; j++) begin
      int cix = (tcell + 1 + j) % 64;
      tk[j] = real'(s - 63 + j);
      v[j]  = real'(int'(f[4 + cix][10:0]) * step);
    end
    half = BASE + AMP / 2.0;
    t50 = -1.0;
    for (int j = 0; j < 63; j++)
      if (t50 < 0 && v[j] < half && v[j + 1] >= half)
        t50 = tk[j] + (half - v[j]) / (v[j + 1] - v[j]);
    check(t50 >= 0, "leading edge inside the recorded window");
  endtask

  task automatic measure(input real delay, input int nbits);
    int t0c, ch, tconv;
    real ta [2], meas, tol;
    spi_write(16, 24'({6'd63, 6'd0, 1'b0, 1'b0, 2'(nbits - 8)}));
    pt[0] = real'(cyc + 200) + 0.25;
    pt[1] = pt[0] + delay;
    while (real'(cyc) < pt[1] + 100) @(negedge clk);
    check(dut.pending[0] && dut.pending[1], "both channels triggered");
    @(negedge clk); conv_start = 1;
    @(negedge clk); conv_start = 0; t0c = cyc;
    while (conv_busy) @(negedge clk);
    tconv = cyc - t0c;
    check(tconv >= (1 << nbits) * VDIV && tconv <= (1 << nbits) * VDIV + 4, "conversion time");
    words.delete();
    rd = 1;
    for (int i = 0; i < 2; i++) begin
      real t;
      read_frame(nbits, ch, t);
      if (ch < 2) ta[ch] = t;
    end
    rd = 0;
    meas = ta[1] - ta[0];
    tol = (nbits >= 10) ? 0.02 : 0.08;
    check((meas - delay) < tol && (delay - meas) < tol, "measured delay");
    $display("%2d bits: applied %10.3f ps  measured %10.3f ps  conversion %0.3f us",
             nbits, delay * 156.25, meas * 156.25, tconv * 0.15625e-3);
    repeat (200) @(negedge clk);
  endtask

  initial begin
    #40ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ch_cfg_t c;
    pt[0] = -1000.0; pt[1] = -1000.0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    c = '{enable: 1'b0, sel_local: 1'b1, sel_ext: 1'b0, sel_central: 1'b0, falling: 1'b0,
          ptdelay: 2'd1, ext_thr: 1'b0, dac: 10'd400};
    spi_write(0, 24'(c)); spi_write(1, 24'(c));
    c.enable = 1'b1;
    spi_write(0, 24'(c)); spi_write(1, 24'(c));
    measure(16.0 + 0.37, 11);     // 2.56 ns
    measure(45.44, 10);           // 7.1 ns
    measure(640.0 + 0.81, 9);     // 100 ns
    measure(6400.0 + 0.13, 8);    // 1 us
    measure(64000.0 + 0.55, 11);  // 10 us
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
