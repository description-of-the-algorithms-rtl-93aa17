// symbol_mapper: antipodal mapping of a channel symbol to a signal level.
//
// A one/zero encoder output symbol x becomes the baseband level y = 1 - 2x:
// 0 -> +1.0 and 1 -> -1.0, in the fixed-point format of fec_pkg (1.0 is
// 2**FRAC_W).  The mapping is combinational; valid, the A/B selector tag and
// the burst-end flag pass alongside the level so that it stays paired with
// its symbol.  The rule y = 1 - 2x is the algorithm's; the number format is
// this design's.
module symbol_mapper
  import fec_pkg::*;
(
  input  logic   sym_valid,
  input  logic   sym,         // encoder output symbol x
  input  sel_t   sym_sel,
  input  logic   sym_last,
  output logic   lvl_valid,
  output level_t lvl,         // y = 1 - 2x, scaled by 2**FRAC_W
  output sel_t   lvl_sel,
  output logic   lvl_last
);

  always_comb begin
    lvl       = level_t'(LEVEL_ONE - (level_t'(sym) <<< (FRAC_W + 1)));
    lvl_valid = sym_valid;
    lvl_sel   = sym_sel;
    lvl_last  = sym_last;
  end

endmodule
