// tb_table1_sweep: the two random-cube experiments, run on the decompressor
// with 1024 chains (default build) and with 512 chains, for scan lengths 24,
// 32, 64 and 128.
//
// Increasing specified bits: with all 32 data channels, the share of
// specified bits per cube is raised in steps of 0.1 % until a cube can no
// longer be produced, once by the original network (configuration 0) and once
// with reconfiguration (any of the 256 configurations, found by symbolic
// Gaussian elimination). The encoding efficiency is specified bits over the
// bits the tester stores: 32 per shift cycle, plus the eight configuration
// bits per cube with reconfiguration.
//
// Reducing channels: a test set of four cubes at the largest share the
// original 32-channel network handled is solved again with fewer and fewer
// data channels (the variables of the dropped channels held at 0), down to
// the smallest count for which every cube still has a configuration. The
// compression ratio counts the configuration channel as one more channel:
// N / (data channels + 1), against N / 32 for the original network.
//
// Every cube that is solved is loaded into the matching decompressor, with
// its configuration, and every chain input is compared with the model. One
// random cube per step of the sweep, so the reported limits are samples.
module tb_table1_sweep;
  import rdc_tb_pkg::*;

  localparam int C  = 8;
  localparam int NM = 1 << C;
  localparam int NS = 512;     // the smaller scan architecture

  typedef test_cube #(.B(32), .N(1024), .C(C)) cube_t;
  typedef test_cube #(.B(32), .N(NS),   .C(C)) scube_t;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [31:0]  chan_i = '0, schan_i = '0;
  logic         cfg_si = 1'b0, cfg_shift = 1'b0, cfg_update = 1'b0;
  logic         scfg_si = 1'b0, scfg_shift = 1'b0, scfg_update = 1'b0;
  logic [1023:0] chain_o;
  logic [NS-1:0] schain_o;
  logic [C-1:0] cfg_o, scfg_o;
  logic         cfg_so, scfg_so;

  reconfig_decompressor dut (.*);

  reconfig_decompressor #(.N(NS)) dut_s (
    .clk, .rst_n, .chan_i(schan_i), .cfg_si(scfg_si), .cfg_shift(scfg_shift),
    .cfg_update(scfg_update), .chain_o(schain_o), .cfg_o(scfg_o), .cfg_so(scfg_so)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // load a solved cube: configuration first (8 shifts and an update), then
  // one shift cycle per scan slice, checking every chain input
  task automatic load_large(cube_t cb);
    for (int i = 0; i <= C; i++) begin
      @(negedge clk);
      cfg_si = (i < C) ? cb.cfg[i % C] : 1'b0;
      cfg_shift = (i < C); cfg_update = (i == C);
    end
    @(negedge clk);
    cfg_shift = 1'b0; cfg_update = 1'b0;
    for (int t = 0; t < cb.len; t++) begin
      logic [1023:0] e = cb.expect_cycle(t);
      chan_i = cb.x[t];
      #1;
      checks++;
      if (chain_o !== e || ((chain_o ^ cb.val[t]) & cb.spec[t]) != '0) begin
        failures++;
        $display("1024-chain decompressor, cycle %0d: wrong chain inputs", t);
      end
      @(negedge clk);
    end
  endtask

  task automatic load_small(scube_t cb);
    for (int i = 0; i <= C; i++) begin
      @(negedge clk);
      scfg_si = (i < C) ? cb.cfg[i % C] : 1'b0;
      scfg_shift = (i < C); scfg_update = (i == C);
    end
    @(negedge clk);
    scfg_shift = 1'b0; scfg_update = 1'b0;
    for (int t = 0; t < cb.len; t++) begin
      logic [NS-1:0] e = cb.expect_cycle(t);
      schan_i = cb.x[t];
      #1;
      checks++;
      if (schain_o !== e || ((schain_o ^ cb.val[t]) & cb.spec[t]) != '0) begin
        failures++;
        $display("512-chain decompressor, cycle %0d: wrong chain inputs", t);
      end
      @(negedge clk);
    end
  endtask

  // first working configuration in the set found by the elimination; a set
  // that names a configuration which then fails counts as a failure
  function automatic bit pick_large(cube_t cb);
    cube_t::fn_t cond = cb.sge();
    for (int m = 0; m < NM; m++) if (cond[m] && cb.solve_with(m)) return 1'b1;
    checks++;
    if (cond != '0) failures++;
    return 1'b0;
  endfunction

  function automatic bit pick_small(scube_t cb);
    scube_t::fn_t cond = cb.sge();
    for (int m = 0; m < NM; m++) if (cond[m] && cb.solve_with(m)) return 1'b1;
    checks++;
    if (cond != '0) failures++;
    return 1'b0;
  endfunction

  task automatic report(int n, int l, int best0, int bestr, int ch0, int chr);
    $display("%0d x %0d: specified bits %0d.%02d %% -> %0d.%02d %% (encoding efficiency %0d -> %0d per mille); tester channels 32 -> %0d (compression ratio %0d.%0d -> %0d.%0d); original network alone needs %0d data channels",
             n, l, best0 / 100, best0 % 100, bestr / 100, bestr % 100,
             (best0 * n) / 320, (bestr * n * l) / ((32 * l + C) * 10),
             chr + 1, n / 32, (10 * n / 32) % 10, n / (chr + 1), (10 * n / (chr + 1)) % 10, ch0);
  endtask

  initial begin
    automatic int lens [4] = '{24, 32, 64, 128};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    foreach (lens[li]) begin
      automatic int L = lens[li];
      automatic int best0 = 0, bestr = 0, ch0 = 32, chr = 32;
      automatic bit go0 = 1'b1, gor = 1'b1;
      automatic cube_t set [4];
      for (int pct = 50; pct <= 400 && (go0 || gor); pct += 10) begin
        automatic cube_t cb = new(L, pct);
        if (go0) begin
          if (cb.solve_with(0)) begin best0 = pct; load_large(cb); end
          else go0 = 1'b0;
        end
        if (gor) begin
          if (pick_large(cb)) begin bestr = pct; load_large(cb); end
          else gor = 1'b0;
        end
      end
      foreach (set[i]) begin
        set[i] = new(L, best0);
        for (int k = 0; k < 20 && !set[i].solve_with(0); k++) set[i] = new(L, best0);
      end
      for (int n = 31; n >= 8; n--) begin
        automatic bit all0 = 1'b1, allr = 1'b1;
        foreach (set[i]) set[i].nch = n;
        foreach (set[i]) if (all0 && !set[i].solve_with(0)) all0 = 1'b0;
        if (all0 && n == ch0 - 1) ch0 = n;
        foreach (set[i]) if (allr && !pick_large(set[i])) allr = 1'b0;
        if (!allr) break;
        chr = n;
      end
      foreach (set[i]) begin
        set[i].nch = chr;
        if (pick_large(set[i])) load_large(set[i]);
        else begin checks++; failures++; end
      end
      report(1024, L, best0, bestr, ch0, chr);
    end

    foreach (lens[li]) begin
      automatic int L = lens[li];
      automatic int best0 = 0, bestr = 0, ch0 = 32, chr = 32;
      automatic bit go0 = 1'b1, gor = 1'b1;
      automatic scube_t set [4];
      for (int pct = 100; pct <= 800 && (go0 || gor); pct += 10) begin
        automatic scube_t cb = new(L, pct);
        if (go0) begin
          if (cb.solve_with(0)) begin best0 = pct; load_small(cb); end
          else go0 = 1'b0;
        end
        if (gor) begin
          if (pick_small(cb)) begin bestr = pct; load_small(cb); end
          else gor = 1'b0;
        end
      end
      foreach (set[i]) begin
        set[i] = new(L, best0);
        for (int k = 0; k < 20 && !set[i].solve_with(0); k++) set[i] = new(L, best0);
      end
      for (int n = 31; n >= 8; n--) begin
        automatic bit all0 = 1'b1, allr = 1'b1;
        foreach (set[i]) set[i].nch = n;
        foreach (set[i]) if (all0 && !set[i].solve_with(0)) all0 = 1'b0;
        if (all0 && n == ch0 - 1) ch0 = n;
        foreach (set[i]) if (allr && !pick_small(set[i])) allr = 1'b0;
        if (!allr) break;
        chr = n;
      end
      foreach (set[i]) begin
        set[i].nch = chr;
        if (pick_small(set[i])) load_small(set[i]);
        else begin checks++; failures++; end
      end
      report(NS, L, best0, bestr, ch0, chr);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
