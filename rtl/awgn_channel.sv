// awgn_channel: additive white Gaussian noise on the transmitted channel levels.
//
// Each transmitted level gets one Gaussian sample with standard deviation
// sigma added to it.  gaussian_noise_gen delivers the samples in pairs
// (G, H); the A symbol of a data bit takes G and the B symbol takes H, after
// which a fresh pair is drawn, so every symbol sees an independent sample.
// The sum is saturated to the level format; clipped flags a saturated sample.
//
// sigma sets the energy per symbol to noise density ratio.  With the symbol
// energy Es = 1, Es/N0 = 1 / (2 sigma**2), i.e. sigma = sqrt(1 / (2 Es/N0)),
// and for a rate k/n code Es/N0 = Eb/N0 + 10 log10(k/n) dB (-3.01 dB at rate
// 1/2).  sigma is computed outside and applied here as an unsigned number
// with FRAC_W fractional bits; sigma = 0 gives a noise-free channel.
//
// Timing: a level in at cycle t comes out, with noise, at cycle t+1; the
// valid, A/B tag and burst-end flag move with it.  The noise model follows
// the algorithm description; the pairing of G/H with the A/B symbols, the
// formats and the saturation are this design's choices.
module awgn_channel
  import fec_pkg::*;
#(
  parameter int          TAB_BITS = 10,
  parameter logic [31:0] SEED     = 32'h9E37_79B9
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   reseed,        // restart the noise sequence
  input  sigma_t sigma,         // noise standard deviation
  input  logic   lvl_valid,
  input  level_t lvl,           // transmitted level
  input  sel_t   lvl_sel,
  input  logic   lvl_last,
  output logic   rx_valid,
  output level_t rx,            // received level = lvl + noise
  output sel_t   rx_sel,
  output logic   rx_last,
  output logic   rx_clipped     // the sum was saturated
);

  level_t g, h, noise;
  logic   noise_valid, next;
  logic signed [SAMPLE_W:0] sum;

  gaussian_noise_gen #(.TAB_BITS(TAB_BITS), .SEED(SEED)) u_noise (
    .clk, .rst_n, .reseed, .sigma, .next, .valid(noise_valid), .g, .h
  );

  always_comb begin
    noise = !noise_valid ? '0 : (lvl_sel == SEL_A) ? g : h;
    next  = lvl_valid && (lvl_sel == SEL_B);
    sum   = (SAMPLE_W+1)'(lvl) + (SAMPLE_W+1)'(noise);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_valid   <= 1'b0;
      rx         <= '0;
      rx_sel     <= SEL_A;
      rx_last    <= 1'b0;
      rx_clipped <= 1'b0;
    end else begin
      rx_valid   <= lvl_valid;
      rx_sel     <= lvl_sel;
      rx_last    <= lvl_valid && lvl_last;
      if (lvl_valid) begin
        rx         <= sat_level(32'(sum));
        rx_clipped <= (sum > (SAMPLE_W+1)'(LEVEL_MAX)) || (sum < (SAMPLE_W+1)'(LEVEL_MIN));
      end else begin
        rx_clipped <= 1'b0;
      end
    end
  end

endmodule
