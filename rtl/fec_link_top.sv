// fec_link_top: baseband model of a convolutionally coded link over an AWGN channel.
//
// The chain, in the order of the link:
//   data_source   random data bits, in bursts of burst_len bits
//   conv_encoder  rate 1/2, K = 3, (7,5) code; two channel symbols per bit
//                 through the SEL A/B selector, K-1 flush bits per burst
//   symbol_mapper antipodal levels y = 1 - 2x
//   snr_to_sigma  noise standard deviation sigma and decision level
//                 D = 0.5 * sigma from the requested Eb/N0 at code rate 1/2
//   awgn_channel  adds Gaussian noise of standard deviation sigma
//   soft_quantizer QBITS-bit soft decisions and hard decisions, decision level D
//   (decoder)     a Viterbi decoder is not part of this design: the quantized
//                 symbols leave on the q_* ports and its decisions come back on
//                 dec_valid / dec_bit
//   error_counter compares the decoded bits with the bits sent and counts errors
//
// Use: with busy low, pulse start for one cycle with burst_len, ebn0 and
// noise_en set, and hold ebn0 and noise_en through the burst;
// the encoder's shift register is cleared and the burst runs at one data bit
// per two clocks, one channel symbol per clock.  q_last marks the last
// quantized symbol of the burst (after flushing).  A symbol sent by the
// encoder at cycle t leaves the quantizer at t+2.  clear_stats zeroes the
// error counters; they otherwise add up over bursts.  ebn0 is Eb/N0 in dB
// with 3 fractional bits (1/8 dB steps, -16 .. +15.875 dB); noise_en low
// makes a noise-free channel (sigma = D = 0).  sigma shows the value in use.
//
// The processing chain and its formulas follow the algorithm description;
// the ports, handshakes, number formats and the start/busy control are this
// design's choices.
module fec_link_top
  import fec_pkg::*;
#(
  parameter int           K          = 3,
  parameter logic [K-1:0] G_UPPER    = 3'o7,
  parameter logic [K-1:0] G_LOWER    = 3'o5,
  parameter int           QBITS      = 3,
  parameter int           TAB_BITS   = 10,
  parameter int           LEN_W      = 16,
  parameter int           ERR_DEPTH  = 64,
  parameter int           CNT_W      = 32,
  parameter logic [31:0]  DATA_SEED  = 32'h2545_F491,
  parameter logic [31:0]  NOISE_SEED = 32'h9E37_79B9
) (
  input  logic             clk,
  input  logic             rst_n,
  // burst control
  input  logic             start,          // begin a burst (while busy is low)
  input  logic [LEN_W-1:0] burst_len,      // data bits in the burst
  input  logic signed [7:0] ebn0,          // Eb/N0 in dB, 3 fractional bits
  input  logic             noise_en,       // add noise (else a noise-free channel)
  output sigma_t           sigma,          // noise standard deviation in use
  input  logic             noise_reseed,   // restart the noise sequence
  input  logic             clear_stats,    // zero the error counters
  output logic             busy,
  // quantized received symbols, to a decoder
  output logic             q_valid,
  output logic [QBITS-1:0] q_soft,
  output logic             q_hard,
  output sel_t             q_sel,
  output logic             q_last,
  // decoded bits, from a decoder
  input  logic             dec_valid,
  input  logic             dec_bit,
  // statistics
  output logic [CNT_W-1:0] bit_count,
  output logic [CNT_W-1:0] err_count,
  output logic             err_overflow,
  output logic             err_underflow,
  output logic             noise_clipped   // a received level was saturated
);

  // data source -> encoder
  logic src_valid, src_bit, src_last, src_busy, enc_ready, start_ok;
  // encoder -> mapper
  logic sym_valid, sym, sym_last, enc_flushing;
  sel_t sym_sel;
  logic [1:0]   enc_pair;
  logic [K-2:0] enc_state;
  // mapper -> channel
  logic   lvl_valid, lvl_last;
  level_t lvl;
  sel_t   lvl_sel;
  // channel -> quantizer
  logic   rx_valid, rx_last, rx_clipped;
  level_t rx;
  sel_t   rx_sel;
  sigma_t d_level, sigma_tab, d_tab;

  assign start_ok = start && !busy;

  snr_to_sigma #(.RATE_K(1), .RATE_N(2), .EBN0_W(8), .EBN0_FRAC(3)) u_snr (
    .ebn0, .sigma(sigma_tab), .d(d_tab)
  );

  assign sigma   = noise_en ? sigma_tab : '0;
  assign d_level = noise_en ? d_tab     : '0;

  data_source #(.SEED(DATA_SEED), .LEN_W(LEN_W)) u_src (
    .clk, .rst_n, .start(start_ok), .burst_len,
    .out_valid(src_valid), .out_bit(src_bit), .out_last(src_last),
    .out_ready(enc_ready), .busy(src_busy)
  );

  conv_encoder #(.K(K), .G_UPPER(G_UPPER), .G_LOWER(G_LOWER)) u_enc (
    .clk, .rst_n, .clear(start_ok),
    .in_valid(src_valid), .in_bit(src_bit), .in_last(src_last), .in_ready(enc_ready),
    .sym_valid, .sym, .sym_sel, .sym_last,
    .pair(enc_pair), .state(enc_state), .flushing(enc_flushing)
  );

  symbol_mapper u_map (
    .sym_valid, .sym, .sym_sel, .sym_last,
    .lvl_valid, .lvl, .lvl_sel, .lvl_last
  );

  awgn_channel #(.TAB_BITS(TAB_BITS), .SEED(NOISE_SEED)) u_chan (
    .clk, .rst_n, .reseed(noise_reseed), .sigma,
    .lvl_valid, .lvl, .lvl_sel, .lvl_last,
    .rx_valid, .rx, .rx_sel, .rx_last, .rx_clipped
  );

  soft_quantizer #(.QBITS(QBITS)) u_quant (
    .clk, .rst_n, .d(d_level),
    .in_valid(rx_valid), .x(rx), .in_sel(rx_sel), .in_last(rx_last),
    .q_valid, .q_soft, .q_hard, .q_sel, .q_last
  );

  error_counter #(.DEPTH(ERR_DEPTH), .CNT_W(CNT_W)) u_err (
    .clk, .rst_n, .clear(clear_stats),
    .tx_valid(src_valid && enc_ready), .tx_bit(src_bit),
    .dec_valid, .dec_bit,
    .bit_count, .err_count, .overflow(err_overflow), .underflow(err_underflow),
    .pending()
  );

  logic clipped_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           clipped_q <= 1'b0;
    else if (clear_stats) clipped_q <= 1'b0;
    else if (rx_clipped)  clipped_q <= 1'b1;
  end
  assign noise_clipped = clipped_q;

  assign busy = src_busy || enc_flushing || sym_valid || rx_valid || q_valid;

endmodule
