// rdc_pkg: constants and the connection formula shared by the reconfigurable
// linear decompressor.
//
// The default sizes are those of the evaluated scan architecture: 32 tester
// channels expanded to 1024 scan chains, a four-input multiplexer in front of
// every chain, and eight configuration bits. The number of inputs XORed into
// each network output (seven) is this design's own choice; any combinational
// linear network may be used in its place.
//
// tap_mask() gives the inputs XORed into one network output. It is a small
// linear congruential generator seeded with the output index:
//   s(0)   = o * 2654435761 + 1            (mod 2^32)
//   s(k+1) = s(k) * 1664525 + 1013904223   (mod 2^32)
//   candidate input = (s(k+1) >> 16) mod b
// Candidates are taken in order, repeats skipped, until `taps` distinct inputs
// are chosen. The result is a b-bit row of the Boolean matrix A, padded to
// MAX_B bits.
package rdc_pkg;

  localparam int unsigned NUM_CHANNELS = 32;    // B, tester channels into the network
  localparam int unsigned NUM_CHAINS   = 1024;  // N, scan chains fed by the decompressor
  localparam int unsigned MUX_INPUTS   = 4;     // inputs of each reconfiguration multiplexer
  localparam int unsigned CFG_BITS     = 8;     // configuration bits per test cube
  localparam int unsigned TAPS_PER_OUT = 7;     // inputs XORed into each network output
  localparam int unsigned MAX_B        = 256;   // widest network input tap_mask() supports

  typedef logic [MAX_B-1:0] tap_row_t;

  function automatic tap_row_t tap_mask(int unsigned o, int unsigned b, int unsigned taps);
    tap_row_t    row;
    logic [31:0] s;
    logic [7:0]  idx;
    int unsigned cnt;
    row = '0;
    cnt = 0;
    s   = o * 32'd2654435761 + 32'd1;
    for (int it = 0; it < 4096; it++) begin
      if (cnt < taps) begin
        s   = s * 32'd1664525 + 32'd1013904223;
        idx = 8'((s >> 16) % b);
        if (!row[idx]) begin
          row[idx] = 1'b1;
          cnt++;
        end
      end
    end
    return row;
  endfunction

endpackage
