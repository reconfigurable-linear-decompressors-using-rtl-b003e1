// reconfig_decompressor: reconfigurable combinational linear decompressor
// (top level).
//
// B tester channels carry free variables every shift cycle; the XOR network
// expands them to N values, and a stage of MUX_IN-input multiplexers decides
// which network output feeds which scan chain. The multiplexer selects come
// from NCFG configuration bits held in config_register and loaded serially on
// one additional tester channel before each test cube. Configuration 0 is the
// original decompressor; other configurations give other output spaces, so a
// test cube that the original network cannot produce may be produced after
// reconfiguration. The configuration and the free variables for a cube are
// computed off-chip (symbolic Gaussian elimination); this block only applies
// them.
//
// Interface: chan_i (B bits) and chain_o (N bits) are the per-cycle tester
// data and scan-chain inputs; cfg_si/cfg_shift/cfg_update load the
// configuration; cfg_o shows the active configuration and cfg_so the end of
// the shadow register.
//
// Timing: chain_o is a combinational function of chan_i and the active
// configuration, so each cycle's tester data is shifted into the chains in
// the same cycle (one cycle per scan-shift, no latency). A configuration takes
// NCFG cycles on cfg_si, which may overlap the previous cube, and becomes
// active on the clock edge at which cfg_update is high.
module reconfig_decompressor
  import rdc_pkg::*;
#(
  parameter int unsigned B      = NUM_CHANNELS,
  parameter int unsigned N      = NUM_CHAINS,
  parameter int unsigned MUX_IN = MUX_INPUTS,
  parameter int unsigned NCFG   = CFG_BITS,
  parameter int unsigned TAPS   = TAPS_PER_OUT
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [B-1:0]    chan_i,      // free variables, one per tester channel
  input  logic            cfg_si,      // configuration channel
  input  logic            cfg_shift,
  input  logic            cfg_update,
  output logic [N-1:0]    chain_o,     // scan-in of each scan chain
  output logic [NCFG-1:0] cfg_o,       // active configuration
  output logic            cfg_so
);

  logic [N-1:0] net_o;

  xor_network #(.B(B), .N(N), .TAPS(TAPS)) u_net (
    .x (chan_i),
    .o (net_o)
  );

  config_register #(.NCFG(NCFG)) u_cfg (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg_si     (cfg_si),
    .cfg_shift  (cfg_shift),
    .cfg_update (cfg_update),
    .cfg        (cfg_o),
    .cfg_so     (cfg_so)
  );

  reconfig_mux_stage #(.N(N), .MUX_IN(MUX_IN), .NCFG(NCFG)) u_mux (
    .net_o   (net_o),
    .cfg     (cfg_o),
    .chain_o (chain_o)
  );

endmodule
