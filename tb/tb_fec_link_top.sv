// tb_fec_link_top: end-to-end test of the coded baseband link at its default
// parameters.
//
// The testbench plays the part of the receiver behind the quantizer.  It
// recomputes the data bits of the source (xorshift32 from the same seed, top
// bit of each value) and encodes them with its own copy of the (7,5) output
// and next-state tables, so every quantized symbol can be compared with the
// symbol that was sent.  As a stand-in for the decoder it inverts the code on
// the hard decisions: for the (7,5) code the sum of the two symbols of data
// bit t is data bit t-1, so each pair after the first returns the previous
// data bit on dec_valid/dec_bit, one bit late.  The testbench counts how many
// of those bits are wrong and checks the link's error counter against that.
//
// Bursts:
//   1. noise off: every hard decision equals the sent symbol, soft codes are
//      0 or 7 only, no bit errors; 2*(n+2) symbols arrive in as many
//      consecutive cycles, the last with q_last.
//   2. Eb/N0 = 2.5 dB, i.e. sigma = 0.75 at rate 1/2: noise flips hard
//      decisions, all eight soft codes occur,
//      the error counter matches the bits the stand-in decoder gets wrong.
//   3. Eb/N0 = -16 dB (sigma 6.3): the channel saturates (noise_clipped).
//   4. decoded bits withheld for a long burst: error buffer overflow; one
//      extra decoded bit: underflow; clear_stats clears them.
// Each mechanism (flush, start from the all-zeroes state, hard-decision error, every soft
// code, saturation, bit error count, overflow, underflow, statistics clear)
// is counted and must have happened at least once.
import fec_pkg::*;
module tb_fec_link_top;
  localparam logic [31:0] DATA_SEED = 32'h2545_F491;   // the top's default
  localparam logic [1:0] NEXT_STATE [8] = '{2'b00, 2'b10, 2'b00, 2'b10, 2'b01, 2'b11, 2'b01, 2'b11};
  localparam logic [1:0] OUT_SYMS   [8] = '{2'b00, 2'b11, 2'b11, 2'b00, 2'b10, 2'b01, 2'b01, 2'b10};

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start = 1'b0, noise_reseed = 1'b0, clear_stats = 1'b0;
  logic [15:0] burst_len = '0;
  logic signed [7:0] ebn0 = '0;
  logic        noise_en = 1'b0;
  sigma_t      sigma;
  logic        busy, q_valid, q_hard, q_last;
  logic [2:0]  q_soft;
  sel_t        q_sel;
  logic        dec_valid, dec_bit;
  logic        sd_valid = 1'b0, sd_bit = 1'b0, man_valid = 1'b0;
  logic [31:0] bit_count, err_count;
  logic        err_overflow, err_underflow, noise_clipped;
  int checks = 0, failures = 0;

  fec_link_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] ref_next(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    return y ^ (y << 5);
  endfunction

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_flush, n_clear, n_hard_err, n_clip, n_bit_err, n_overflow, n_underflow, n_stats_clear;
  int soft_seen [8];

  // reference state
  logic [31:0] r = DATA_SEED;
  logic        exp_sym [$];     // symbols sent in the current burst
  logic        data_bits [$];   // data bits of the current burst

  // receiver side
  bit          hold_decoded;    // keep decoded bits back (overflow test)
  int          rx_count, first_cyc, last_cyc, cyc, sym_errs, strong_only_viol, dec_wrong;
  logic        pair_a;
  int          dec_idx;

  always @(posedge clk) cyc++;

  assign dec_valid = sd_valid || man_valid;
  assign dec_bit   = sd_valid && sd_bit;

  always @(posedge clk) begin
    sd_valid <= 1'b0;
    if (rst_n && q_valid) begin
      logic e;
      if (rx_count == 0) first_cyc = cyc;
      if (q_last) begin last_cyc = cyc; n_flush++; end
      e = (rx_count < exp_sym.size()) ? exp_sym[rx_count] : 1'b0;
      if (q_hard != e) begin sym_errs++; n_hard_err++; end
      // a noise-free burst whose first pair matches the encoder started in state 00
      if (rx_count == 1 && sigma == 0 && q_hard == exp_sym[1] && pair_a == exp_sym[0]) n_clear++;
      if (q_hard != q_soft[2]) strong_only_viol++;
      soft_seen[q_soft]++;
      if (sigma == 0 && q_soft != 3'd0 && q_soft != 3'd7) strong_only_viol++;
      if (q_sel == SEL_A) pair_a = q_hard;
      else begin
        // stand-in decoder: upper ^ lower of pair t is data bit t-1
        logic u;
        u = pair_a ^ q_hard;
        if (dec_idx >= 1 && dec_idx - 1 < data_bits.size() && !hold_decoded) begin
          sd_valid <= 1'b1;
          sd_bit   <= u;
          if (u != data_bits[dec_idx - 1]) dec_wrong++;
        end
        dec_idx++;
      end
      rx_count++;
    end
  end

  task automatic run_burst(input int n, input logic en, input logic signed [7:0] eb);
    logic [1:0] st;
    exp_sym = {}; data_bits = {};
    st = 2'b00;
    for (int i = 0; i < n + 2; i++) begin
      logic u;
      logic [1:0] o;
      if (i < n) begin u = r[31]; r = ref_next(r); data_bits.push_back(u); end
      else u = 1'b0;
      o = OUT_SYMS[{st, u}];
      exp_sym.push_back(o[1]); exp_sym.push_back(o[0]);
      st = NEXT_STATE[{st, u}];
    end
    rx_count = 0; sym_errs = 0; strong_only_viol = 0; dec_idx = 0; dec_wrong = 0;
    first_cyc = -1; last_cyc = -1;
    noise_en <= en; ebn0 <= eb; burst_len <= 16'(n); start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    while (busy || start) @(posedge clk);
    repeat (3) @(posedge clk);
    check(rx_count == 2 * (n + 2), $sformatf("burst of %0d bits: %0d symbols, expected %0d", n, rx_count, 2 * (n + 2)));
    check(last_cyc - first_cyc + 1 == 2 * (n + 2), $sformatf("burst of %0d bits spans %0d cycles", n, last_cyc - first_cyc + 1));
    check(strong_only_viol == 0, "hard decision is the soft code's top bit (and codes 0/7 only without noise)");
  endtask

  initial begin
    int prev_err, prev_bits;
    n_flush = 0; n_clear = 0; n_hard_err = 0; n_clip = 0; n_bit_err = 0;
    n_overflow = 0; n_underflow = 0; n_stats_clear = 0; cyc = 0; hold_decoded = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    // 1. noise-free burst
    run_burst(300, 1'b0, 8'sd0);
    check(sym_errs == 0, $sformatf("%0d symbol errors without noise", sym_errs));
    check(bit_count == 300 && err_count == 0, $sformatf("noise free: %0d bits %0d errors", bit_count, err_count));

    // 2. noisy burst, sigma = 0.75
    prev_err = int'(err_count); prev_bits = int'(bit_count);
    run_burst(3000, 1'b1, 8'sd20);
    $display("Eb/N0 2.5 dB, sigma %0d/256: %0d of %0d symbols flipped, %0d of %0d bits wrong",
             sigma, sym_errs, rx_count, int'(err_count) - prev_err, int'(bit_count) - prev_bits);
    check(sigma >= 191 && sigma <= 193, "Eb/N0 2.5 dB at rate 1/2 gives sigma 0.75");
    check(sym_errs > 0, "noise flips some hard decisions");
    check(int'(bit_count) - prev_bits == 3000, "all bits compared");
    check(int'(err_count) - prev_err == dec_wrong, $sformatf("error counter %0d, stand-in decoder wrong %0d",
          int'(err_count) - prev_err, dec_wrong));
    // about 9 % of symbols should flip at sigma 0.75 (Q(1/0.75) = 0.091 at the
    // hard threshold; the tail cut of the generator lowers it a little)
    check(sym_errs * 1000 > rx_count * 60 && sym_errs * 1000 < rx_count * 120, "symbol error rate near Q(1/sigma)");
    if (int'(err_count) > prev_err) n_bit_err++;

    // 3. heavy noise saturates the channel
    run_burst(500, 1'b1, -8'sd128);
    if (noise_clipped) n_clip++;

    // 4. overflow and underflow of the error buffer, then clear
    clear_stats <= 1'b1; @(posedge clk); clear_stats <= 1'b0; @(posedge clk);
    hold_decoded = 1'b1;
    run_burst(100, 1'b0, 8'sd0);
    hold_decoded = 1'b0;
    if (err_overflow) n_overflow++;
    check(bit_count == 0, "no comparisons while decoded bits are held");
    for (int i = 0; i <= 64; i++) begin
      man_valid <= 1'b1; @(posedge clk);
    end
    man_valid <= 1'b0; @(posedge clk); #1;
    if (err_underflow) n_underflow++;
    check(bit_count == 64, $sformatf("64 buffered bits compared, got %0d", bit_count));
    clear_stats <= 1'b1; @(posedge clk); clear_stats <= 1'b0; @(posedge clk); #1;
    if (bit_count == 0 && err_count == 0 && !err_overflow && !err_underflow && !noise_clipped) n_stats_clear++;

    $display("mechanisms: flush %0d, clear %0d, hard errors %0d, saturation %0d, bit errors %0d, overflow %0d, underflow %0d, stats clear %0d",
             n_flush, n_clear, n_hard_err, n_clip, n_bit_err, n_overflow, n_underflow, n_stats_clear);
    check(n_flush == 4, "every burst flushed and marked last");
    check(n_clear == 2, "noise-free bursts start from the all-zeroes state");
    check(n_hard_err > 0, "hard-decision errors");
    check(n_clip > 0, "channel saturation");
    check(n_bit_err > 0, "bit errors counted");
    check(n_overflow > 0, "error buffer overflow");
    check(n_underflow > 0, "error buffer underflow");
    check(n_stats_clear > 0, "statistics clear");
    for (int c = 0; c < 8; c++) check(soft_seen[c] > 0, $sformatf("soft code %0d seen", c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
