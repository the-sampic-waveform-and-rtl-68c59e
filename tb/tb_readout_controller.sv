// Self-checking testbench of readout_controller. The testbench holds the
// channel buffers: Gray timestamps, trigger cells and 64 Gray cell codes per
// channel, filled with random values, and empties a buffer when the
// controller releases it. Frames are collected from the bus on RCk strobes
// (every other clock) with Read dropped at random. Each frame must carry the
// documented header (channel, binary timestamp, trigger cell, first cell and
// length) and the binary cell codes in order; channels must come in rotating
// order; full frames are 68 words and RoI frames 4 + length words, one word
// per RCk while Read is high.
module tb_readout_controller;
  import sampic_pkg::*;
  logic clk = 0, rst_n = 0, rd = 0, rck_ce = 0;
  glb_cfg_t cfg;
  logic [15:0] buf_full = 0, release_buf;
  logic [11:0] ts_gray [16];
  logic [5:0] trig_cell [16];
  logic [3:0] rd_ch;
  logic [5:0] rd_cell;
  logic [10:0] rd_code;
  logic [11:0] bus_data;
  logic bus_valid, bus_last;
  logic [10:0] mem [16][64];
  logic [11:0] words [$];
  int checks = 0, failures = 0, frames = 0, roi_frames = 0, last_ch = -1, strobes;

  readout_controller #(.N_CH(16)) dut (.*);

  assign rd_code = mem[rd_ch][rd_cell];

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL %s at %0t", msg, $time); end
  endtask

  function automatic logic [11:0] g2b(input logic [11:0] g);
    logic [11:0] b;
    b[11] = g[11];
    for (int i = 10; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  task automatic check_frame(input int ch, input bit roi);
    int first, n;
    first = roi ? (int'(trig_cell[ch]) + int'(cfg.roi_offset)) % 64 : 0;
    n = roi ? int'(cfg.roi_len_m1) + 1 : 64;
    check(words.size() == 4 + n, "frame length");
    if (words.size() != 4 + n) return;
    check(words[0] == {4'b1000, 4'(ch), cfg.res_sel, roi, 1'b0}, "header word 0");
    check(words[1] == g2b(ts_gray[ch]), "timestamp word");
    check(words[2] == {6'b0, trig_cell[ch]}, "trigger cell word");
    check(words[3] == {6'(first), 6'(n - 1)}, "first cell / length word");
    for (int k = 0; k < n; k++)
      check(words[4 + k] == {1'b0, 11'(g2b({1'b0, mem[ch][(first + k) % 64]}))}, "cell word");
  endtask

  // buffer model: release empties the buffer
  always @(posedge clk) if (rst_n) buf_full <= buf_full & ~release_buf;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // RCk strobes and Read level
  always @(negedge clk) begin
    rck_ce <= ~rck_ce;
    if (rck_ce == 1'b0) rd <= ($urandom_range(0, 7) != 0);
  end

  initial begin
    cfg = '{roi_len_m1: 6'd9, roi_offset: 6'd60, roi_en: 1'b0, fge_en: 1'b0, res_sel: 2'd3};
    for (int c = 0; c < 16; c++) begin
      ts_gray[c] = 12'($urandom); trig_cell[c] = 6'($urandom);
      for (int i = 0; i < 64; i++) mem[c][i] = 11'($urandom);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk);
      cfg.roi_en = (pass == 1);
      buf_full = (pass == 0) ? 16'b1010_0000_1001_0110 : 16'hffff;
      last_ch = -1;
      while (buf_full != 0) begin
        int ch;
        bit roi;
        words.delete();
        strobes = 0;
        // wait for the first word
        do begin
          @(posedge clk);
          #0.1;
        end while (!(bus_valid && bus_data[11:8] == 4'b1000));
        ch = int'(bus_data[7:4]);
        roi = bus_data[1];
        words.push_back(bus_data);
        while (!bus_last) begin
          bit ce, r;
          @(posedge clk); ce = rck_ce; r = rd; #0.1;
          if (ce) begin
            strobes++;
            if (r) check(bus_valid, "one word per RCk while Read is high");
            else check(!bus_valid, "no word while Read is low");
            if (bus_valid) words.push_back(bus_data);
          end
        end
        check(ch > last_ch, "rotating order");
        last_ch = ch;
        check_frame(ch, roi);
        frames++;
        if (roi) roi_frames++;
        @(negedge clk);
      end
    end
    check(frames == 22 && roi_frames == 16, "all frames read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
