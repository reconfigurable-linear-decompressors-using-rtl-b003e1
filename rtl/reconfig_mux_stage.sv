// reconfig_mux_stage: the reconfiguration stage between the XOR network and
// the scan chains.
//
// Each scan chain is driven by a MUX_IN-input multiplexer whose inputs are
// different outputs of the XOR network and whose select comes from the
// configuration bits; changing the configuration changes which network
// output (which row of the matrix A) reaches which chain, and so the output
// space of the decompressor. Multiplexers in front of every chain, four inputs
// each and eight configuration bits follow the method; how the inputs and the
// selects are wired is this design's choice:
//   * the chains are split into GROUPS = NCFG / log2(MUX_IN) groups, chain i
//     in group i mod GROUPS, and all multiplexers of a group share one select
//     field cfg[g*SEL_W +: SEL_W];
//   * input k of chain i is network output (i + k*N/MUX_IN) mod N.
// Input 0 is the chain's own output, so the all-zero configuration is the
// original decompressor. Because N/MUX_IN is a multiple of GROUPS, every
// source of a chain lies in the chain's own group, and every configuration is
// a permutation of the network outputs over the chains.
//
// Timing: purely combinational.
module reconfig_mux_stage
  import rdc_pkg::*;
#(
  parameter int unsigned N      = NUM_CHAINS,  // scan chains
  parameter int unsigned MUX_IN = MUX_INPUTS,  // inputs per multiplexer
  parameter int unsigned NCFG   = CFG_BITS     // configuration bits
) (
  input  logic [N-1:0]    net_o,   // XOR network outputs
  input  logic [NCFG-1:0] cfg,     // active configuration
  output logic [N-1:0]    chain_o  // scan chain inputs
);

  localparam int unsigned SEL_W  = $clog2(MUX_IN);
  localparam int unsigned GROUPS = NCFG / SEL_W;
  localparam int unsigned STRIDE = N / MUX_IN;

  if (MUX_IN < 2 || (1 << SEL_W) != MUX_IN || NCFG % SEL_W != 0 ||
      N % MUX_IN != 0 || STRIDE % GROUPS != 0) begin : g_bad_size
    $error("reconfig_mux_stage: MUX_IN must be a power of two, NCFG a multiple of log2(MUX_IN), N/MUX_IN a multiple of the group count");
  end

  for (genvar i = 0; i < N; i++) begin : g_chain
    localparam int unsigned G = i % GROUPS;
    logic [MUX_IN-1:0] src;
    for (genvar k = 0; k < MUX_IN; k++) begin : g_src
      assign src[k] = net_o[(i + k * STRIDE) % N];
    end
    assign chain_o[i] = src[cfg[G*SEL_W +: SEL_W]];
  end

endmodule
