// tb_awgn_channel: self-checking test of the AWGN channel.
//
// A stream of +1/-1 levels with alternating A/B tags is sent through the
// channel.  With sigma = 0 every received level must equal the sent one,
// one cycle later, with its tags.  With sigma = 0.5 the received minus sent
// levels must have mean near 0 and variance near 0.25, and the samples of
// the A and B symbols of a pair must be uncorrelated.  With sigma = 4 some
// sums leave the level range: they must be saturated and flagged, and every
// flagged sample must sit at a range limit.
import fec_pkg::*;
module tb_awgn_channel;
  logic   clk = 1'b0, rst_n = 1'b0, reseed = 1'b0;
  sigma_t sigma = '0;
  logic   lvl_valid = 1'b0, lvl_last = 1'b0;
  level_t lvl = '0;
  sel_t   lvl_sel = SEL_A;
  logic   rx_valid, rx_last, rx_clipped;
  level_t rx;
  sel_t   rx_sel;
  int checks = 0, failures = 0;

  awgn_channel dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real fabs(input real a);
    return (a < 0.0) ? -a : a;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send n symbols; record sent level and received level (one cycle later)
  level_t sent_q [$];
  real    diff [$];
  int     clipped, clipped_off_limit, bad_tag, bad_exact;
  bit     exact;

  always @(posedge clk) if (rst_n && rx_valid) begin
    level_t s;
    s = sent_q.pop_front();
    diff.push_back(real'(rx) - real'(s));
    if (exact && rx != s) bad_exact++;
    if (rx_clipped) begin
      clipped++;
      if (rx != LEVEL_MAX && rx != LEVEL_MIN) clipped_off_limit++;
    end
  end

  sel_t exp_sel_q;
  always @(posedge clk) if (rst_n) begin
    if (rx_valid && rx_sel != exp_sel_q) bad_tag++;
    exp_sel_q <= lvl_sel;
  end

  task automatic run(input int n);
    for (int i = 0; i < n; i++) begin
      level_t l;
      l = ($urandom % 2) ? LEVEL_ONE : -LEVEL_ONE;
      lvl_valid <= 1'b1; lvl <= l; lvl_sel <= (i % 2 == 0) ? SEL_A : SEL_B;
      lvl_last <= (i == n - 1);
      sent_q.push_back(l);
      @(posedge clk);
    end
    lvl_valid <= 1'b0; lvl_last <= 1'b0;
    @(posedge clk); @(posedge clk);
  endtask

  initial begin
    clipped = 0; clipped_off_limit = 0; bad_tag = 0; bad_exact = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    exact = 1'b1; sigma <= '0; diff = {};
    run(200);
    check(diff.size() == 200, "all noise-free symbols arrive");
    check(bad_exact == 0, $sformatf("%0d noise-free symbols changed", bad_exact));
    check(bad_tag == 0, "A/B tag carried with the level");
    exact = 1'b0;

    sigma <= sigma_t'(1 << (FRAC_W - 1));   // 0.5
    diff = {};
    run(20000);
    begin
      real one, m, v, c;
      one = real'(1 << FRAC_W);
      m = 0; v = 0; c = 0;
      foreach (diff[i]) m += diff[i];
      m /= diff.size();
      foreach (diff[i]) v += (diff[i] - m) * (diff[i] - m);
      v /= diff.size();
      for (int i = 0; i + 1 < diff.size(); i += 2) c += diff[i] * diff[i+1];
      c /= (diff.size() / 2);
      $display("channel noise: mean %f variance %f A*B %f", m / one, v / (one * one), c / (one * one));
      check(fabs(m / one) < 0.02, "noise mean near zero");
      check(v / (one * one) > 0.23 && v / (one * one) < 0.27, "noise variance near 0.25");
      check(fabs(c / (one * one)) < 0.02, "A and B noise uncorrelated");
    end
    check(clipped == 0, "no clipping at sigma 0.5");

    sigma <= sigma_t'(4 << FRAC_W);          // 4.0
    diff = {};
    run(4000);
    check(clipped > 0, $sformatf("%0d samples saturated at sigma 4", clipped));
    check(clipped_off_limit == 0, "flagged samples are saturated");
    check(bad_tag == 0, "tags after all runs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
