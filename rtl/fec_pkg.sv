// fec_pkg: types and constants shared by the blocks of the coded baseband link.
//
// Received and transmitted channel levels are carried as signed fixed-point
// numbers with SAMPLE_W bits, FRAC_W of them fractional, so the noise-free
// antipodal levels +1 and -1 are +2**FRAC_W and -2**FRAC_W.  With 12 bits and
// 8 fractional bits the range is [-8, +8), enough for a unit symbol plus the
// largest noise sample the Gaussian generator can produce (3.9 sigma) for
// sigma up to 1.8.
// The widths are this design's choice; the algorithm fixes none of them.
package fec_pkg;

  localparam int SAMPLE_W = 12;                 // width of a channel level
  localparam int FRAC_W   = 8;                  // fractional bits of a level
  localparam int SIGMA_W  = 12;                 // unsigned noise standard deviation, FRAC_W fractional bits

  typedef logic signed [SAMPLE_W-1:0] level_t;  // channel level, Q(SAMPLE_W-FRAC_W).FRAC_W
  typedef logic        [SIGMA_W-1:0]  sigma_t;  // noise standard deviation / decision level

  localparam level_t LEVEL_ONE = level_t'(1 <<< FRAC_W);  // +1.0
  localparam level_t LEVEL_MAX = level_t'({1'b0, {(SAMPLE_W-1){1'b1}}});
  localparam level_t LEVEL_MIN = level_t'({1'b1, {(SAMPLE_W-1){1'b0}}});

  // Output selector of the rate 1/2 encoder: which adder drives the channel.
  typedef enum logic {SEL_A = 1'b0, SEL_B = 1'b1} sel_t;

  // Saturate a wide signed value to a channel level.
  function automatic level_t sat_level(input logic signed [31:0] v);
    if (v > 32'(LEVEL_MAX))      return LEVEL_MAX;
    else if (v < 32'(LEVEL_MIN)) return LEVEL_MIN;
    else                         return level_t'(v);
  endfunction

endpackage
