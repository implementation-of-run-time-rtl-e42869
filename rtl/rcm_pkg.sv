// rcm_pkg: types and constants shared by the run-time reconfigurable constant
// multiplier.
//
// The multiplier computes y = c * x, where c is one of a small set of
// constants chosen at run time by a configuration index that travels down the
// pipeline together with its sample. The set {1912, 1111, 1331} and the 16-bit
// input word follow the reference design; the 2-bit configuration encoding
// (index i selects CONSTS[i]) and the output width are this design's choices.
package rcm_pkg;

  // Input word width (signed two's complement).
  localparam int unsigned W_IN   = 16;
  // Bits needed for the largest constant, 1912 < 2**11.
  localparam int unsigned C_BITS = 11;
  // Output word width: every product of a W_IN-bit signed input fits.
  localparam int unsigned W_OUT  = W_IN + C_BITS;

  // Number of configurations; index 0, 1, 2 selects 1912, 1111, 1331.
  localparam int unsigned N_CONF = 3;

  // Configuration index: wide enough for up to four configurations.
  localparam int unsigned CFG_W = 2;
  typedef logic [CFG_W-1:0] cfg_t;

  // Marker used in multiplexer selection tables for "output zero".
  localparam logic [7:0] SEL_ZERO = 8'hFF;

endpackage
