// cfar_pkg: sizes shared by the CA-CFAR modules.
//
// The defaults are the configuration the design is built around: 16-bit
// samples, a learning window of 16 cells plus one test cell (17 cells in all),
// and 32 CFAR units working side by side on consecutive test cells. The sum of
// the learning cells needs b_r = ceil(log2(n*(2^a-1))) bits and the threshold
// b_c = b_TA + b_r bits; both widths are derived here from the other sizes.
// The 16-bit factor TA with 12 fraction bits is this design's own choice.
package cfar_pkg;

  // a: width of one input sample
  localparam int unsigned DATA_W   = 16;
  // n: number of learning cells in one window
  localparam int unsigned N_LEARN  = 16;
  // position of the test cell x_z inside the (N_LEARN+1)-cell window;
  // cells 0..TEST_POS-1 are older than the test cell, the rest newer
  localparam int unsigned TEST_POS = N_LEARN / 2;
  // k: number of parallel CFAR units (samples taken and decisions made per cycle)
  localparam int unsigned K_PAR    = 32;
  // b_TA: width of the scalar factor TA, unsigned fixed point
  localparam int unsigned TA_W     = 16;
  // fraction bits of TA (TA = ta / 2^TA_FRAC)
  localparam int unsigned TA_FRAC  = 12;

  // b_r = ceil(log2(n*(2^a - 1))): width of the sum of n samples of a bits
  function automatic int unsigned sum_width(int unsigned n, int unsigned a);
    return a + $clog2(n);
  endfunction

endpackage
