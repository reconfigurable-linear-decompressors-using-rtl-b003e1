// tb_reconfig_decompressor: end-to-end test of the reconfigurable linear
// decompressor at its default size (32 channels, 1024 chains, four-input
// multiplexers, eight configuration bits).
//
// The testbench plays the part of the off-chip tools and of the tester:
//   1. It draws 16 random test cubes, every combination of scan length 24,
//      32, 64 and 128 with 1.0, 1.6, 2.0 and 2.4 % specified bits.
//   2. For each cube it runs symbolic Gaussian elimination (rdc_tb_pkg) to
//      find the configurations that can produce it, and for the shorter cubes
//      checks that set against an exhaustive search over all 256
//      configurations.
//   3. It takes a random configuration from that set, confirms it with
//      ordinary Gaussian elimination, which also yields the free variables,
//      and records whether the original network (configuration 0) could have
//      produced the cube.
//   4. It shifts each cube's configuration in on the configuration channel
//      during the previous cube, updates it at the cube boundary, drives one
//      word of free variables per scan shift and compares every chain input
//      of every cycle with the model, and every specified bit with the cube.
//      The cubes must follow each other with no idle cycle (continuous flow).
//   5. It then finds one configuration that suits a whole test set of four
//      cubes (the AND of their configuration sets), loads it once, and
//      applies the four cubes back to back with no further update.
// Mechanisms counted (a failure if one never happens): configuration shifts
// overlapping data, configuration changes at a cube boundary, each
// multiplexer select value in use, cubes that only a non-zero configuration
// can produce, and a test set run under a single configuration.
module tb_reconfig_decompressor;
  import rdc_tb_pkg::*;

  localparam int B     = 32;
  localparam int N     = 1024;
  localparam int M     = 4;
  localparam int C     = 8;
  localparam int NM    = 1 << C;
  localparam int NCUBE = 16;

  typedef test_cube #(.B(B), .N(N), .M(M), .C(C)) cube_t;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [B-1:0] chan_i = '0;
  logic         cfg_si = 1'b0, cfg_shift = 1'b0, cfg_update = 1'b0;
  logic [N-1:0] chain_o;
  logic [C-1:0] cfg_o;
  logic         cfg_so;

  reconfig_decompressor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_overlap = 0, n_reconf = 0, n_rescued = 0, n_sel [M];
  int n_one_cfg = 0;
  int n_orig_ok = 0, n_loaded = 0, n_unsolved = 0, n_sge_wrong = 0;

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one shift cycle: drive after the falling edge, sample before the rising one
  task automatic shift_cycle(logic [B-1:0] x, logic si, logic sh, logic up);
    @(negedge clk);
    chan_i = x; cfg_si = si; cfg_shift = sh; cfg_update = up;
    #1;
  endtask

  task automatic check_cycle(cube_t cb, int t);
    logic [N-1:0] e = cb.expect_cycle(t);
    for (int c = 0; c < N; c++) begin
      checks++;
      if (chain_o[c] !== e[c]) begin
        failures++;
        if (failures < 10) $display("cycle %0d chain %0d: got %b expected %b", t, c, chain_o[c], e[c]);
      end
    end
    checks++;
    if (((chain_o ^ cb.val[t]) & cb.spec[t]) != '0) begin
      failures++;
      if (failures < 10) $display("cycle %0d: specified bits not produced", t);
    end
  endtask

  initial begin
    int      lens [4] = '{24, 32, 64, 128};
    int      pcts [4] = '{100, 160, 200, 240};
    cube_t   order [$];
    int      prev = 0, expect_cycles = 0;
    longint  t0 = 0;

    for (int k = 0; k < M; k++) n_sel[k] = 0;

    // off-chip part: solve every cube
    for (int q = 0; q < NCUBE; q++) begin
      automatic cube_t cb = new(lens[q / 4], pcts[q % 4]);
      automatic cube_t::fn_t cond = cb.sge();
      automatic bit ok0 = cb.solve_with(0);
      automatic bit loaded = 1'b0;
      if (cb.len <= 32) begin
        automatic cube_t::fn_t exact = '0;
        for (int m = 0; m < NM; m++) exact[m] = cb.solve_with(m);
        checks++;
        if (exact != cond) begin
          failures++;
          $display("cube %0d: elimination finds %0d configurations, exhaustive search %0d", q, $countones(cond), $countones(exact));
        end
      end
      if (cond != '0) begin
        automatic int start = $urandom % NM;
        for (int i = 0; i < NM && !loaded; i++)
          if (cond[(start + i) % NM]) loaded = cb.solve_with((start + i) % NM);
        if (!loaded) n_sge_wrong++;
      end
      if (ok0) n_orig_ok++;
      if (loaded) begin n_loaded++; order.push_back(cb); end
      else n_unsolved++;
      if (loaded && !ok0) n_rescued++;
      $display("cube %0d: length %0d, %0d specified bits (%0d.%02d %%): original network %s; %0d of %0d configurations work; %s %02h",
               q, cb.len, cb.nspec, pcts[q % 4] / 100, pcts[q % 4] % 100, ok0 ? "solves" : "fails",
               $countones(cond), NM, loaded ? "loaded with configuration" : "skipped", cb.cfg);
    end

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1;
    checks++;
    if (cfg_o !== '0) failures++;

    if (order.size() > 0) begin
      // first configuration: shifted in before any data, then updated
      for (int i = 0; i < C; i++) shift_cycle('0, order[0].cfg[i], 1'b1, 1'b0);
      shift_cycle('0, 1'b0, 1'b0, 1'b1);
      foreach (order[i]) begin
        automatic cube_t cb   = order[i];
        automatic bit    more = (i + 1 < order.size());
        automatic cube_t nx   = more ? order[i + 1] : cb;
        if (cb.cfg != C'(prev)) n_reconf++;
        prev = int'(cb.cfg);
        for (int g = 0; g < C / 2; g++) n_sel[(cb.cfg >> (2 * g)) & 3]++;
        for (int t = 0; t < cb.len; t++) begin
          automatic bit sh = more && (t < C);
          shift_cycle(cb.x[t], sh ? nx.cfg[t] : 1'b0, sh, more && (t == cb.len - 1));
          if (sh) n_overlap++;
          if (i == 0 && t == 0) t0 = cyc;
          if (t == 0) begin
            checks++;
            if (cfg_o !== cb.cfg) begin
              failures++;
              $display("cube %0d: active configuration %02h, expected %02h", i, cfg_o, cb.cfg);
            end
          end
          check_cycle(cb, t);
        end
        expect_cycles += cb.len;
      end
      @(negedge clk);
      checks++;
      if (cyc - t0 != longint'(expect_cycles)) begin
        failures++;
        $display("cycle count %0d, expected %0d", cyc - t0, expect_cycles);
      end
    end

    // one configuration for a whole test set
    begin
      automatic cube_t       set [4];
      automatic cube_t::fn_t common = '1;
      automatic int          mc = -1;
      foreach (set[i]) begin
        set[i] = new(32, 200);
        common &= set[i].sge();
      end
      for (int m = 0; m < NM && mc < 0; m++)
        if (common[m]) begin
          automatic bit ok = 1'b1;
          foreach (set[i]) if (ok) ok = set[i].solve_with(m);
          if (ok) mc = m;
        end
      $display("test set of 4 cubes (length 32, 2.00 %%): %0d configurations suit all of them", $countones(common));
      if (mc >= 0) begin
        for (int i = 0; i < C; i++) shift_cycle('0, 1'(mc >> i), 1'b1, 1'b0);
        shift_cycle('0, 1'b0, 1'b0, 1'b1);
        foreach (set[i])
          for (int t = 0; t < set[i].len; t++) begin
            shift_cycle(set[i].x[t], 1'b0, 1'b0, 1'b0);
            checks++;
            if (cfg_o !== C'(mc)) failures++;
            check_cycle(set[i], t);
          end
        n_one_cfg++;
      end
    end

    $display("cubes: %0d solvable by the original network, %0d loaded with reconfiguration, %0d by neither; %0d need a non-zero configuration",
             n_orig_ok, n_loaded, n_unsolved, n_rescued);
    $display("mechanisms: overlapped configuration shifts %0d, configuration changes %0d, select values used %0d/%0d/%0d/%0d, cubes rescued by reconfiguration %0d, test sets under one configuration %0d",
             n_overlap, n_reconf, n_sel[0], n_sel[1], n_sel[2], n_sel[3], n_rescued, n_one_cfg);
    checks++;
    if (n_overlap == 0 || n_reconf == 0 || n_rescued == 0 || n_one_cfg == 0) failures++;
    checks++;
    if (n_sge_wrong != 0) failures++;
    for (int k = 0; k < M; k++) begin
      checks++;
      if (n_sel[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
