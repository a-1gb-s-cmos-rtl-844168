// Shared constants of the multiphase data retiming circuit.
//
// The circuit works with seven bit clocks CP[n], n = -3..+3, each delayed
// from the previous one by one seventh of the bit period T. Vectors indexed
// by phase are stored little-endian with an offset of 3, so bit i holds
// phase n = i - 3 and CP[0], the system bit clock, is bit PH0.
// The extended two-bit-wide window has thirteen positions m = -6..+6,
// stored with an offset of 6, so bit j holds position m = j - 6.
package retimer_pkg;
  localparam int unsigned NPH  = 7;            // number of multiphase clocks
  localparam int unsigned PH0  = 3;            // index of CP[0]
  localparam int unsigned NEXT = 2 * NPH - 1;  // positions in the extended window
  localparam int unsigned M0   = NPH - 1;      // index of position m = 0

  typedef logic [NPH-1:0]  phase_vec_t;        // one bit per phase n
  typedef logic [NEXT-1:0] ext_vec_t;          // one bit per position m
endpackage
