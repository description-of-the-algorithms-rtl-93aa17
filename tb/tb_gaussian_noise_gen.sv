// tb_gaussian_noise_gen: self-checking test of the Gaussian noise generator.
//
// The expected samples are recomputed here in floating point from the
// Rayleigh/uniform relations, G = s*sqrt(2 ln(1/(1-U)))*cos(2 pi V) and
// H = s*sqrt(2 ln(1/(1-U)))*sin(2 pi V), with U and V taken from a reference
// xorshift32 sequence of the same seed (top 10 bits each, cell centres).
// Every sample must match within 2 LSB.  Over 20000 pairs at sigma = 1.0 the
// sample mean must be near 0 and the variance near 1, and G and H must be
// uncorrelated.  sigma = 0 must give zero noise, and a pair must be held
// while next is low and change the cycle after next.
import fec_pkg::*;
module tb_gaussian_noise_gen;
  localparam logic [31:0] SEED = 32'hCAFE_0001;
  localparam int TB_BITS = 10;
  localparam real PI = 3.14159265358979323846;
  logic   clk = 1'b0, rst_n = 1'b0, reseed = 1'b0, next = 1'b0, valid;
  sigma_t sigma = '0;
  level_t g, h;
  int checks = 0, failures = 0;
  logic [31:0] r;

  gaussian_noise_gen #(.TAB_BITS(TB_BITS), .SEED(SEED)) dut (.*);

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

  function automatic real fabs(input real a);
    return (a < 0.0) ? -a : a;
  endfunction

  // expected (G, H) in level LSBs for uniform word w and sigma s
  task automatic expected(input logic [31:0] w, input real s, output real eg, output real eh);
    real u, v, rr;
    u  = (real'(w[31 -: TB_BITS]) + 0.5) / real'(1 << TB_BITS);
    v  = (real'(w[31-TB_BITS -: TB_BITS]) + 0.5) / real'(1 << TB_BITS);
    rr = s * $sqrt(2.0 * $ln(1.0 / (1.0 - u)));
    eg = rr * $cos(2.0 * PI * v) * real'(1 << FRAC_W);
    eh = rr * $sin(2.0 * PI * v) * real'(1 << FRAC_W);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real eg, eh, s, sum, sum2, sumgh, n;
    int worst;
    r = SEED;
    sigma = sigma_t'(1 << FRAC_W);     // 1.0
    s = 1.0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // the first pair is drawn by itself after reset
    @(posedge clk); @(posedge clk); #1;
    check(valid, "valid after priming");
    expected(r, s, eg, eh);
    check(fabs(real'(g) - eg) <= 2.0 && fabs(real'(h) - eh) <= 2.0,
          $sformatf("first pair %0d %0d, expected %f %f", g, h, eg, eh));
    r = ref_next(r);
    // held while next is low
    begin
      level_t g0, h0;
      g0 = g; h0 = h;
      repeat (3) @(posedge clk);
      #1 check(g == g0 && h == h0, "pair held without next");
    end
    sum = 0; sum2 = 0; sumgh = 0; n = 0; worst = 0;
    for (int i = 0; i < 20000; i++) begin
      next <= 1'b1;
      @(posedge clk); #1;
      expected(r, s, eg, eh);
      r = ref_next(r);
      if (fabs(real'(g) - eg) > 2.0 || fabs(real'(h) - eh) > 2.0) begin
        worst++;
        if (worst < 5) $display("FAIL: pair %0d got %0d %0d expected %f %f", i, g, h, eg, eh);
      end
      sum   += real'(g) + real'(h);
      sum2  += real'(g) * real'(g) + real'(h) * real'(h);
      sumgh += real'(g) * real'(h);
      n     += 2;
    end
    next <= 1'b0;
    checks++; if (worst != 0) failures++;
    begin
      real mean, var_, corr, one;
      one  = real'(1 << FRAC_W);
      mean = sum / n / one;
      var_ = sum2 / n / (one * one) - mean * mean;
      corr = sumgh / (n / 2) / (one * one);
      $display("noise statistics: mean %f variance %f G*H %f", mean, var_, corr);
      check(fabs(mean) < 0.03, "mean near zero");
      check(var_ > 0.92 && var_ < 1.08, "variance near sigma^2 = 1");
      check(fabs(corr) < 0.05, "G and H uncorrelated");
    end
    // sigma = 0 gives no noise
    sigma <= '0; next <= 1'b1;
    @(posedge clk); #1;
    check(g == 0 && h == 0, "zero noise at sigma = 0");
    next <= 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
