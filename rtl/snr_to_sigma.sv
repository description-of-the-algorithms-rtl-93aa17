// snr_to_sigma: noise standard deviation and quantizer decision level from Eb/N0.
//
// The noise added to the channel is set by the energy per bit to noise
// density ratio Eb/N0.  With the symbol energy fixed at 1 and a rate
// RATE_K/RATE_N code:
//   Es/N0 [dB] = Eb/N0 [dB] + 10 log10(RATE_K / RATE_N)   (-3.01 dB at rate 1/2)
//   sigma      = sqrt(1 / (2 Es/N0))                       (Es/N0 as a ratio)
//   D          = 0.5 * sigma                               (soft-decision level)
// ebn0 is a signed number of dB with EBN0_FRAC fractional bits (1/8 dB steps
// by default, -16 .. +15.875 dB).  Both results for every possible ebn0 are
// computed at elaboration by constant functions from these formulas, rounded
// to the unsigned sigma format of fec_pkg and limited to its largest value,
// and looked up here; the lookup is combinational.
//
// The formulas are the algorithm's; the dB input format, the step size and
// the lookup-table form are this design's choices.
module snr_to_sigma
  import fec_pkg::*;
#(
  parameter int RATE_K    = 1,       // code rate RATE_K / RATE_N
  parameter int RATE_N    = 2,
  parameter int EBN0_W    = 8,       // width of ebn0
  parameter int EBN0_FRAC = 3        // fractional bits of ebn0, in dB
) (
  input  logic signed [EBN0_W-1:0] ebn0,   // Eb/N0 in dB
  output sigma_t                   sigma,  // noise standard deviation
  output sigma_t                   d       // decision level 0.5 * sigma
);

  localparam int N = 1 << EBN0_W;

  typedef sigma_t tab_t [N];

  // Entry i is for ebn0 = i read as a signed EBN0_W-bit number.
  function automatic tab_t make_tab(input real scale);
    tab_t tab;
    real  lim;
    lim = real'((1 << SIGMA_W) - 1);
    for (int i = 0; i < N; i++) begin
      real eb_db, es_db, es, s;
      eb_db = real'((i >= N / 2) ? i - N : i) / real'(1 << EBN0_FRAC);
      es_db = eb_db + 10.0 * $log10(real'(RATE_K) / real'(RATE_N));
      es    = 10.0 ** (es_db / 10.0);
      s     = scale * $sqrt(1.0 / (2.0 * es)) * real'(1 << FRAC_W) + 0.5;
      tab[i] = (s >= lim) ? sigma_t'((1 << SIGMA_W) - 1) : sigma_t'($rtoi(s));
    end
    return tab;
  endfunction

  localparam tab_t SIGMA_TAB = make_tab(1.0);
  localparam tab_t D_TAB     = make_tab(0.5);

  always_comb begin
    sigma = SIGMA_TAB[unsigned'(ebn0)];
    d     = D_TAB[unsigned'(ebn0)];
  end

  if (RATE_K < 1 || RATE_N < RATE_K) begin : g_bad_rate
    $error("snr_to_sigma: need 1 <= RATE_K <= RATE_N");
  end

endmodule
