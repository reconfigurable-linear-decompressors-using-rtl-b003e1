// xor_network: the combinational linear expansion network of the
// decompressor.
//
// Every shift cycle the tester presents B free variables on x; the network
// drives N outputs, one per scan chain, each the XOR of a fixed subset of x.
// Output j therefore realises row j of the decompressor's Boolean matrix A
// (a 1 in column i means x[i] is XORed into output j). Which inputs feed which
// output is not fixed by the method, which works on top of any combinational
// linear network; this design uses TAPS inputs per output chosen by
// rdc_pkg::tap_mask(), so each output depends on TAPS channels.
//
// Timing: purely combinational, no clock. Its output settles within the shift
// cycle in which x is applied (continuous-flow decompression: new data every
// cycle).
module xor_network
  import rdc_pkg::*;
#(
  parameter int unsigned B    = NUM_CHANNELS,  // tester channels (network inputs)
  parameter int unsigned N    = NUM_CHAINS,    // network outputs
  parameter int unsigned TAPS = TAPS_PER_OUT   // inputs XORed into each output
) (
  input  logic [B-1:0] x,
  output logic [N-1:0] o
);

  if (B > MAX_B || TAPS > B || TAPS == 0) begin : g_bad_size
    $error("xor_network: need 0 < TAPS <= B <= MAX_B");
  end

  for (genvar j = 0; j < N; j++) begin : g_out
    localparam tap_row_t ROW = tap_mask(j, B, TAPS);
    assign o[j] = ^(x & ROW[B-1:0]);
  end

endmodule
