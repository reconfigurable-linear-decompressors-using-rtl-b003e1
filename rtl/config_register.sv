// config_register: holds the configuration bits of the reconfigurable
// decompressor.
//
// The configuration of a test cube arrives serially on one extra tester
// channel. Bits are shifted into a shadow register while cfg_shift is high
// (bits enter at the top and move down, so after NCFG shifts the first bit
// sent is bit 0: the word is sent least significant bit first). A cfg_update pulse copies the shadow register into the
// active register that drives the multiplexer selects. The shadow register
// lets the configuration of the next cube be shifted in while the current cube
// is still being decompressed; the update is then given between cubes. One
// channel and loading before each cube follow the method; the shadow/active
// split, the strobes and the bit order are this design's choices.
//
// Timing: both registers change on the rising edge of clk. If cfg_shift and
// cfg_update are high in the same cycle, the active register takes the shadow
// value from before that shift. Asynchronous active-low reset clears both,
// which selects the original (unreconfigured) network.
module config_register
  import rdc_pkg::*;
#(
  parameter int unsigned NCFG = CFG_BITS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_si,      // serial configuration data from the tester
  input  logic            cfg_shift,   // shift cfg_si into the shadow register
  input  logic            cfg_update,  // copy shadow into active
  output logic [NCFG-1:0] cfg,         // active configuration
  output logic            cfg_so       // last bit of the shadow register (for chaining)
);

  logic [NCFG-1:0] shadow;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shadow <= '0;
      cfg    <= '0;
    end else begin
      if (cfg_shift)  shadow <= {cfg_si, shadow[NCFG-1:1]};
      if (cfg_update) cfg    <= shadow;
    end
  end

  assign cfg_so = shadow[0];

endmodule
