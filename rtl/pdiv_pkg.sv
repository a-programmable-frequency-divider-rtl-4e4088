// Shared constants of the programmable divider with close-to-50% duty cycle.
//
// The divider is a chain of NSTAGES "2/3 cells" controlled by NSTAGES+1 binary
// ratio bits.  The defaults give a division ratio range of 8 .. 511: the smallest
// ratio (8) is the one stated for the design, the largest (2^9-1) is this design's
// choice, the smallest chain that covers every ratio the fabricated part was
// measured with (up to 510).  The fractional PLL divider adds FRAC_BITS bits of
// fraction (steps of 1/4, as in its measured ratios 240.25 and 240.5).
package pdiv_pkg;
  // number of 2/3 cells in the chain (ratio bits P0..P[NSTAGES])
  localparam int unsigned NSTAGES   = 8;
  // log2 of the smallest ratio of the inner 2/3-cell chain (chain ratio >= 4);
  // the complete divider divides by twice that, so its smallest ratio is 8
  localparam int unsigned VMIN      = 2;
  // fraction bits of the delta-sigma controlled fractional divider
  localparam int unsigned FRAC_BITS = 2;
endpackage
