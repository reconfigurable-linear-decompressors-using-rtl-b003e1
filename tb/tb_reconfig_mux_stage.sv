// tb_reconfig_mux_stage: self-checking testbench for reconfig_mux_stage at
// its default size (1024 chains, four-input multiplexers, eight
// configuration bits).
//
// For random network outputs and every select value of every group, each
// chain input is compared with network output (i + k*N/4) mod N, where k is
// the 2-bit field of the configuration belonging to group i mod 4. It also
// checks that every configuration only permutes the network outputs (the
// number of ones is kept).
module tb_reconfig_mux_stage;
  localparam int N = 1024;
  localparam int M = 4;
  localparam int C = 8;
  localparam int G = 4;

  logic [N-1:0] net_o, chain_o;
  logic [C-1:0] cfg;
  int checks = 0, failures = 0;

  reconfig_mux_stage dut (.net_o(net_o), .cfg(cfg), .chain_o(chain_o));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < N; i++) begin
      int k   = (int'(cfg) >> (2 * (i % G))) & 3;
      int src = (i + k * (N / M)) % N;
      checks++;
      if (chain_o[i] !== net_o[src]) begin
        failures++;
        if (failures < 10) $display("cfg %h chain %0d: got %b, expected out %0d = %b", cfg, i, chain_o[i], src, net_o[src]);
      end
    end
    checks++;
    if ($countones(chain_o) != $countones(net_o)) failures++;
  endtask

  initial begin
    // every configuration with one-hot network outputs at a few positions
    for (int c = 0; c < (1 << C); c++) begin
      cfg = c[C-1:0];
      for (int v = 0; v < 4; v++) begin
        for (int w = 0; w < N / 32; w++) net_o[w*32 +: 32] = $urandom;
        #1;
        check_all();
      end
      net_o = '0; net_o[$urandom % N] = 1'b1;
      #1;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
