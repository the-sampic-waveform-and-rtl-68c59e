// Self-checking testbench of channel_trigger. Random discriminator, external
// trigger, central trigger and FGE activity is applied under configurations
// that change every 150 cycles (enable, source selection, edge, delay 0/1/2,
// FGE option). A reference model in the testbench recomputes, from its own
// copy of the sampled discriminator and external trigger, the source term of
// every cycle; `trig` after edge n must equal the source of edge
// n - delay*PT_UNIT, and `local_hit` must match the selected edge. Coverage
// counters require each source, each delay, both edges and FGE blocking.
module tb_channel_trigger;
  import sampic_pkg::*;
  localparam int PT = 3;
  logic clk = 0, rst_n = 0;
  logic disc = 0, ext_trig = 0, central = 0, fge = 0, fge_en = 0;
  ch_cfg_t cfg;
  logic local_hit, trig;
  int checks = 0, failures = 0;
  bit srcs [0:9999];
  bit d1 = 0, d2 = 0, e1 = 0, e2 = 0, exp_local, src;
  int n_local = 0, n_ext = 0, n_cent = 0, n_fall = 0, n_blocked = 0;
  int n_dly [3] = '{0, 0, 0};

  channel_trigger #(.PT_UNIT(PT)) dut (.*);

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
    cfg = '0;
    for (int i = 0; i < 10000; i++) srcs[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 9000; n++) begin
      @(negedge clk);
      if (n % 150 == 0) begin
        cfg = ch_cfg_t'($urandom);
        cfg.enable = ($urandom_range(0, 5) != 0);
        cfg.ptdelay = 2'($urandom_range(0, 3));
        fge_en = ($urandom_range(0, 2) == 0);
      end
      if ($urandom_range(0, 5) == 0) disc = ~disc;
      if ($urandom_range(0, 7) == 0) ext_trig = ~ext_trig;
      central = ($urandom_range(0, 15) == 0);
      fge = ($urandom_range(0, 3) != 0);
      #0.5;
      // reference: source term computed from the model's own sampled history
      exp_local = cfg.enable && (cfg.falling ? (d2 && !d1) : (d1 && !d2));
      src = cfg.enable && (!fge_en || fge) &&
            ((cfg.sel_local && exp_local) || (cfg.sel_ext && e1 && !e2) ||
             (cfg.sel_central && central));
      check(local_hit == exp_local, "local hit");
      srcs[n] = src;
      if (cfg.enable && fge_en && !fge &&
          ((cfg.sel_local && exp_local) || (cfg.sel_ext && e1 && !e2) || (cfg.sel_central && central)))
        n_blocked++;
      if (src) begin
        if (cfg.sel_local && exp_local) n_local++;
        if (cfg.sel_ext && e1 && !e2) n_ext++;
        if (cfg.sel_central && central) n_cent++;
        if (cfg.falling && cfg.sel_local && exp_local) n_fall++;
      end
      @(posedge clk);
      d2 = d1; d1 = disc; e2 = e1; e1 = ext_trig;
      #0.1;
      begin
        int d, m;
        d = (cfg.ptdelay == 0) ? 0 : (cfg.ptdelay == 1 ? PT : 2 * PT);
        m = n - d;
        if (n % 150 >= 2 * PT + 1) begin
          check(trig == ((m >= 0) ? srcs[m] : 1'b0), "delayed trigger");
          if (trig) n_dly[d / PT]++;
        end
      end
    end
    check(n_local > 0 && n_ext > 0 && n_cent > 0 && n_fall > 0, "all sources seen");
    check(n_blocked > 0, "FGE blocking seen");
    check(n_dly[0] > 0 && n_dly[1] > 0 && n_dly[2] > 0, "all delays seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
