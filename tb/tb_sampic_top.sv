// End-to-end testbench of the SAMPIC model at its default parameters
// (16 channels, 64 cells, post-trigger unit 6 steps, ADC oscillator at 1/5 of
// the step clock, RCk at 1/40 of it, i.e. 6.4 GS/s, 1.28 GHz and 160 MHz).
// The testbench configures the chip over SPI, applies triangular pulses to
// the channel inputs and an external trigger, requests conversions when the
// trigger flag rises and reads all frames when the data flag rises. A
// reference model in the testbench predicts, from the waveforms alone, each
// channel's stop time (threshold crossing + 2 + delay), hence the timestamp
// and trigger cell of its frame, and the code of every cell read
// (min(ceil(level / 2^(12-n)), 2^n - 1) of the level last written there).
// Phase A: 11-bit full readout; local triggers with delays 0/1/2, falling
// edge, external threshold, external trigger, central OR trigger, a disabled
// channel, and a second event that must wait for its channel's buffer.
// Phase B: 8-bit conversion, region-of-interest readout, Fast Global Enable.
// Conversion time, frame length in RCk periods and rotating read order are
// checked, and every mechanism must have occurred at least once.
module tb_sampic_top;
  import sampic_pkg::*;
  localparam int PT = 6, VDIV = 5, RCKDIV = 40, BASE = 300;

  logic clk = 0, rst_n = 0;
  volt_t vin [16];
  volt_t vth_ext = 12'd2000;
  logic ext_trig = 0, fge = 0, spi_sclk = 0, spi_mosi = 0, spi_cs_n = 1, spi_miso;
  logic conv_start = 0, rd = 0, rck_ce = 0;
  logic [11:0] bus_data;
  logic bus_valid, bus_last, flag_trig, flag_data, conv_busy;

  sampic_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0, rck_cnt = 0;
  int pulses [16][$];
  ch_cfg_t cfgs [16];
  glb_cfg_t gcfg;
  int exp_s [16];          // expected stop index per channel (-1: none)
  logic [12:0] words [$];  // {last, data}
  int frames_read [$];
  // mechanism counters
  int m_local = 0, m_ext = 0, m_central = 0, m_falling = 0, m_extthr = 0, m_d1 = 0, m_d2 = 0;
  int m_disabled = 0, m_fge = 0, m_bufwait = 0, m_roi = 0, m_full = 0, m_res8 = 0, m_res11 = 0;
  int m_rotate = 0, m_dead = 0, m_spird = 0;

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s at cycle %0d", msg, cyc); end
  endtask

  function automatic int level(input int ch, input int k);
    int v = BASE;
    foreach (pulses[ch][i]) begin
      int d = (k > pulses[ch][i]) ? k - pulses[ch][i] : pulses[ch][i] - k;
      if (d < 10) v += (10 - d) * 300;
    end
    return v;
  endfunction

  function automatic int thr(input int ch);
    return cfgs[ch].ext_thr ? int'(vth_ext) : 4 * int'(cfgs[ch].dac);
  endfunction

  // First discriminator edge of the selected polarity at or after k0.
  function automatic int crossing(input int ch, input int k0);
    int k = k0;
    while (!(level(ch, k) > thr(ch))) k++;
    if (cfgs[ch].falling) while (level(ch, k) > thr(ch)) k++;
    return k;
  endfunction

  function automatic int dly(input int ch);
    return (cfgs[ch].ptdelay == 0) ? 0 : (cfgs[ch].ptdelay == 1 ? PT : 2 * PT);
  endfunction

  function automatic int g2b(input logic [11:0] g);
    logic [11:0] b;
    b[11] = g[11];
    for (int i = 10; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return int'(b);
  endfunction

  // ---------------------------------------------------------------- stimulus
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;
  always @(negedge clk) begin
    for (int c = 0; c < 16; c++) vin[c] = volt_t'(level(c, cyc));
    rck_cnt = (rck_cnt + 1) % RCKDIV;
    rck_ce = (rck_cnt == 0);
  end

  // bus monitor: one word per RCk strobe
  initial forever begin
    @(posedge clk);
    if (rck_ce) begin
      #0.1;
      if (bus_valid) words.push_back({bus_last, bus_data});
    end
  end

  task automatic spi_xfer(input logic [31:0] fout, output logic [23:0] din);
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

  task automatic configure();
    logic [23:0] d;
    ch_cfg_t off;
    // thresholds first with the channels disabled, so that the threshold
    // change itself cannot produce a discriminator edge on an enabled channel
    for (int c = 0; c < 16; c++) begin
      off = cfgs[c];
      off.enable = 1'b0;
      spi_xfer({1'b0, 7'(c), 24'(off)}, d);
    end
    for (int c = 0; c < 16; c++) spi_xfer({1'b0, 7'(c), 24'(cfgs[c])}, d);
    spi_xfer({1'b0, 7'd16, 24'(gcfg)}, d);
    spi_xfer({1'b1, 7'd16, 24'd0}, d);
    check(d == 24'(gcfg), "SPI read-back of the global register");
    m_spird++;
  endtask

  task automatic wait_until(input int k);
    while (cyc < k) @(negedge clk);
  endtask

  // Request a conversion; check its length against 2^n oscillator periods.
  task automatic convert(input int nbits);
    int t0;
    @(negedge clk); conv_start = 1;
    @(negedge clk); conv_start = 0; t0 = cyc;
    check(conv_busy, "conversion started");
    while (conv_busy) @(negedge clk);
    check(cyc - t0 >= (1 << nbits) * VDIV && cyc - t0 <= (1 << nbits) * VDIV + 4,
          "conversion time of 2^n ADC clock periods");
    if (nbits == 8) m_res8++; else m_res11++;
  endtask

  // Read every waiting frame and check it against the model.
  task automatic readout(input int nbits, input int nframes);
    int got = 0;
    words.delete();
    rd = 1;
    while (got < nframes) begin
      int t_first, ch, s, first, n, maxc, step;
      logic [12:0] f [$];
      wait (words.size() > 0);
      t_first = cyc;
      f.delete();
      forever begin
        wait (words.size() > 0);
        f.push_back(words.pop_front());
        if (f[$][12]) break;
      end
      got++;
      ch = int'(f[0][7:4]);
      frames_read.push_back(ch);
      check(f[0][11:8] == 4'b1000, "frame header marker");
      check(f.size() >= 4, "frame has a header");
      if (f.size() < 4) continue;
      s = int'(f[1][11:0]) * 64 + int'(f[2][5:0]);
      check(exp_s[ch] >= 0, "frame from a channel that triggered");
      check(s == exp_s[ch], "stop time = timestamp * 64 + trigger cell");
      first = int'(f[3][11:6]);
      n = int'(f[3][5:0]) + 1;
      check(f.size() == 4 + n, "frame length");
      check(cyc - t_first >= (3 + n) * RCKDIV && cyc - t_first <= (4 + n) * RCKDIV,
            "one word per RCk period");
      if (gcfg.roi_en) begin
        check(first == (exp_s[ch] % 64 + int'(gcfg.roi_offset)) % 64 && n == int'(gcfg.roi_len_m1) + 1,
              "RoI window");
        m_roi++;
      end else begin
        check(first == 0 && n == 64, "full readout");
        m_full++;
      end
      maxc = (1 << nbits) - 1;
      step = 1 << (12 - nbits);
      for (int j = 0; j < n && 4 + j < f.size(); j++) begin
        int cix, lastk, e;
        cix = (first + j) % 64;
        lastk = exp_s[ch] - ((exp_s[ch] - cix) % 64 + 64) % 64;
        e = (level(ch, lastk) + step - 1) / step;
        if (e > maxc) e = maxc;
        check(int'(f[4 + j][11:0]) == e, "cell code");
      end
    end
    rd = 0;
    repeat (2 * RCKDIV) @(negedge clk);
    check(!flag_data, "all buffers read");
  endtask

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0, t0;
    foreach (exp_s[c]) exp_s[c] = -1;
    for (int c = 0; c < 16; c++)
      cfgs[c] = '{enable: 1'b1, sel_local: 1'b1, sel_ext: 1'b0, sel_central: 1'b0, falling: 1'b0,
                  ptdelay: 2'd0, ext_thr: 1'b0, dac: 10'd400};
    for (int c = 0; c < 8; c++) cfgs[c].ptdelay = 2'(c % 3);
    cfgs[8]  = '{enable: 1'b1, sel_local: 1'b0, sel_ext: 1'b1, sel_central: 1'b0, falling: 1'b0,
                 ptdelay: 2'd1, ext_thr: 1'b0, dac: 10'd1023};
    cfgs[9]  = '{enable: 1'b1, sel_local: 1'b0, sel_ext: 1'b0, sel_central: 1'b1, falling: 1'b0,
                 ptdelay: 2'd0, ext_thr: 1'b0, dac: 10'd1023};
    cfgs[10].enable = 1'b0;
    cfgs[11].falling = 1'b1;
    cfgs[12].ext_thr = 1'b1;
    gcfg = '{roi_len_m1: 6'd15, roi_offset: 6'd60, roi_en: 1'b0, fge_en: 1'b0, res_sel: 2'd3};
    repeat (3) @(negedge clk);
    rst_n = 1;
    configure();

    // ------------------------------------------------------------ phase A
    t0 = cyc + 1000;
    for (int c = 0; c < 16; c++) if (c != 8 && c != 9) pulses[c].push_back(t0 + 50 * c);
    for (int c = 0; c < 16; c++) begin
      if (c == 8 || c == 9 || c == 10) continue;
      exp_s[c] = crossing(c, t0 - 100) + 2 + dly(c);
      m_local++;
      if (cfgs[c].ptdelay == 1) m_d1++;
      if (cfgs[c].ptdelay == 2) m_d2++;
      if (cfgs[c].falling) m_falling++;
      if (cfgs[c].ext_thr) m_extthr++;
    end
    exp_s[8] = t0 + 600 + 2 + PT;                  // external trigger sampled at edge t0 + 600
    exp_s[9] = crossing(0, t0 - 100) + 2;              // central OR fired by channel 0
    m_ext++; m_central++;
    wait_until(t0 + 600); ext_trig = 1;
    wait_until(t0 + 604); ext_trig = 0;
    wait_until(t0 + 1500);
    check(flag_trig && !flag_data, "trigger flag raised");
    for (int c = 0; c < 16; c++) check(dut.pending[c] == (c != 10), "held channels");
    if (!dut.pending[10]) m_disabled++;
    fork
      convert(11);
      begin
        // a pulse while channel 0 is converting is not recorded
        pulses[0].push_back(cyc + 3000);
        wait_until(cyc + 3100);
        check(!dut.pending[0] && !dut.sampling[0], "dead during conversion");
        m_dead++;
      end
    join
    check(flag_data && !flag_trig, "data flag raised, channels re-armed");
    // a second event on channel 0 while its buffer is still full
    c0 = cyc + 200;
    pulses[0].push_back(c0);
    wait_until(c0 + 300);
    check(flag_trig && dut.pending[0] && !dut.ready[0], "event waits for the buffer");
    @(negedge clk); conv_start = 1; @(negedge clk); conv_start = 0;
    check(!conv_busy, "no conversion while the buffer is full");
    m_bufwait++;
    begin
      int sA0;
      sA0 = exp_s[0];
      readout(11, 15);
      // the held event moves on only now: its expected stop time
      exp_s[0] = crossing(0, c0 - 100) + 2 + dly(0);
      // channel 9 listens to the central OR, so channel 0's hit held it too
      exp_s[9] = crossing(0, c0 - 100) + 2;
      check(exp_s[0] != sA0, "second event is a new one");
    end
    check(frames_read.size() == 15, "15 frames in phase A");
    for (int i = 1; i < frames_read.size(); i++) check(frames_read[i] > frames_read[i-1], "rotating order");
    m_rotate++;
    check(flag_trig && dut.ready[0], "held event offered after readout");

    // ------------------------------------------------------------ phase B
    gcfg.res_sel = 2'd0; gcfg.roi_en = 1'b1; gcfg.fge_en = 1'b1;
    configure();
    fge = 0;
    c0 = cyc + 200;
    pulses[1].push_back(c0);                       // blocked by FGE
    wait_until(c0 + 100);
    check(!dut.pending[1], "FGE low blocks triggers");
    m_fge++;
    fge = 1;
    pulses[2].push_back(cyc + 200);
    exp_s[2] = crossing(2, cyc + 100) + 2 + dly(2);
    wait_until(cyc + 400);
    check(dut.pending[2], "FGE high lets triggers through");
    convert(8);
    frames_read.delete();
    readout(8, 3);
    check(frames_read.size() == 3 && frames_read[0] == 0 && frames_read[1] == 2 && frames_read[2] == 9,
          "rotating priority restarts after the last channel");

    check(m_local > 0 && m_ext > 0 && m_central > 0 && m_falling > 0 && m_extthr > 0, "trigger sources seen");
    check(m_d1 > 0 && m_d2 > 0 && m_disabled > 0 && m_fge > 0 && m_bufwait > 0 && m_dead > 0, "trigger options seen");
    check(m_roi > 0 && m_full > 0 && m_res8 > 0 && m_res11 > 0 && m_rotate > 0 && m_spird > 0, "readout modes seen");
    $display("mechanisms: local=%0d ext=%0d central=%0d falling=%0d extthr=%0d d1=%0d d2=%0d disabled=%0d fge=%0d bufwait=%0d dead=%0d roi=%0d full=%0d res8=%0d res11=%0d rotate=%0d spi=%0d",
             m_local, m_ext, m_central, m_falling, m_extthr, m_d1, m_d2, m_disabled, m_fge, m_bufwait,
             m_dead, m_roi, m_full, m_res8, m_res11, m_rotate, m_spird);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
