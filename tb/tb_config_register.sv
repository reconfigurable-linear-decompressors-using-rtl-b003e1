// tb_config_register: self-checking testbench for config_register (eight
// bits).
//
// Drives random serial data with random shift and update strobes against a
// cycle-accurate model kept in the testbench, after first checking reset and
// a plain 8-cycle load: the first bit sent must land in bit 0 and the active
// configuration must change only on the update edge, exactly one cycle after
// the update strobe is applied.
module tb_config_register;
  localparam int C = 8;

  logic clk = 0, rst_n = 0;
  logic cfg_si = 0, cfg_shift = 0, cfg_update = 0;
  logic [C-1:0] cfg;
  logic cfg_so;
  logic [C-1:0] m_shadow, m_cfg;
  int checks = 0, failures = 0;

  config_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (cfg !== m_cfg || cfg_so !== m_shadow[0]) begin
      failures++;
      if (failures < 10) $display("%s: cfg=%h expected %h, so=%b expected %b", what, cfg, m_cfg, cfg_so, m_shadow[0]);
    end
  endtask

  // drive at the falling edge, model the rising edge
  task automatic step(logic si, logic sh, logic up);
    @(negedge clk);
    cfg_si = si; cfg_shift = sh; cfg_update = up;
    @(posedge clk);
    if (up) m_cfg = m_shadow;
    if (sh) m_shadow = {si, m_shadow[C-1:1]};
    #1;
  endtask

  initial begin
    logic [C-1:0] word;
    m_shadow = '0; m_cfg = '0;
    #12;
    check("reset");
    rst_n = 1;
    // plain load of one word, least significant bit first
    word = 8'hB4;
    for (int i = 0; i < C; i++) begin
      step(word[i], 1'b1, 1'b0);
      check("shift");
      checks++;
      if (cfg !== 8'h00) failures++;   // not yet active
    end
    step(1'b0, 1'b0, 1'b1);
    checks++;
    if (cfg !== word) begin
      failures++;
      $display("load: cfg=%h expected %h", cfg, word);
    end
    // random traffic
    for (int n = 0; n < 2000; n++) begin
      step(1'($urandom), 1'($urandom), ($urandom % 5) == 0);
      check("random");
    end
    // reset in the middle clears both registers
    rst_n = 0; m_shadow = '0; m_cfg = '0;
    #1;
    check("async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
