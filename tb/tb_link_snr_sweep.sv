// tb_link_snr_sweep: channel calibration of the whole link over Eb/N0.
//
// For Eb/N0 = 0, 2, 4 and 6 dB the link sends a burst of 4000 data bits at
// its default parameters.  The testbench recomputes the sent channel symbols
// (same data seed, its own copy of the (7,5) tables) and counts how many hard
// decisions differ.  For antipodal signalling in AWGN that rate is
// Q(sqrt(2 Es/N0)) with Es/N0 = Eb/N0 - 3.01 dB at rate 1/2; Q is computed
// here by numerical integration.  The measured rate must lie within five
// standard deviations (plus 3 % for the generator's tail cut) of it, and the
// rate must fall as Eb/N0 rises.
import fec_pkg::*;
module tb_link_snr_sweep;
  localparam logic [31:0] DATA_SEED = 32'h2545_F491;
  localparam logic [1:0] NEXT_STATE [8] = '{2'b00, 2'b10, 2'b00, 2'b10, 2'b01, 2'b11, 2'b01, 2'b11};
  localparam logic [1:0] OUT_SYMS   [8] = '{2'b00, 2'b11, 2'b11, 2'b00, 2'b10, 2'b01, 2'b01, 2'b10};
  localparam int NBITS = 4000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start = 1'b0, noise_reseed = 1'b0, clear_stats = 1'b0, noise_en = 1'b1;
  logic [15:0] burst_len = '0;
  logic signed [7:0] ebn0 = '0;
  sigma_t      sigma;
  logic        busy, q_valid, q_hard, q_last;
  logic [2:0]  q_soft;
  sel_t        q_sel;
  logic [31:0] bit_count, err_count;
  logic        err_overflow, err_underflow, noise_clipped;
  int checks = 0, failures = 0;

  fec_link_top dut (
    .clk, .rst_n, .start, .burst_len, .ebn0, .noise_en, .sigma, .noise_reseed,
    .clear_stats, .busy, .q_valid, .q_soft, .q_hard, .q_sel, .q_last,
    .dec_valid(1'b0), .dec_bit(1'b0),
    .bit_count, .err_count, .err_overflow, .err_underflow, .noise_clipped
  );

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

  // Q(a) = integral from a to infinity of the unit normal density (Simpson)
  function automatic real qfunc(input real a);
    real h, sum, x;
    int  n;
    n = 4000;
    h = (a + 10.0 - a) / real'(n);
    sum = 0.0;
    for (int i = 0; i <= n; i++) begin
      real w;
      x = a + h * real'(i);
      w = (i == 0 || i == n) ? 1.0 : ((i % 2 == 1) ? 4.0 : 2.0);
      sum += w * $exp(-x * x / 2.0);
    end
    return sum * h / 3.0 / $sqrt(2.0 * 3.14159265358979323846);
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic exp_sym [$];
  int   rx_count, sym_errs;

  always @(posedge clk) if (rst_n && q_valid) begin
    if (rx_count < exp_sym.size() && q_hard != exp_sym[rx_count]) sym_errs++;
    rx_count++;
  end

  initial begin
    logic [31:0] r;
    real prev_rate;
    r = DATA_SEED;
    prev_rate = 1.0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int k = 0; k < 4; k++) begin
      logic [1:0] st;
      real eb_db, es, p, sd, rate;
      eb_db = 2.0 * real'(k);
      exp_sym = {};
      st = 2'b00;
      for (int i = 0; i < NBITS + 2; i++) begin
        logic u;
        logic [1:0] o;
        if (i < NBITS) begin u = r[31]; r = ref_next(r); end
        else u = 1'b0;
        o = OUT_SYMS[{st, u}];
        exp_sym.push_back(o[1]); exp_sym.push_back(o[0]);
        st = NEXT_STATE[{st, u}];
      end
      rx_count = 0; sym_errs = 0;
      ebn0 <= 8'(16 * k); burst_len <= 16'(NBITS); start <= 1'b1;
      @(posedge clk); start <= 1'b0;
      while (busy || start) @(posedge clk);
      repeat (3) @(posedge clk);
      es   = 10.0 ** ((eb_db - 3.0103) / 10.0);
      p    = qfunc($sqrt(2.0 * es));
      sd   = $sqrt(p * (1.0 - p) / real'(rx_count));
      rate = real'(sym_errs) / real'(rx_count);
      $display("Eb/N0 %4.1f dB: sigma %0d/256, symbol error rate %f, theory %f", eb_db, sigma, rate, p);
      check(rx_count == 2 * (NBITS + 2), "all symbols received");
      check(rate > p * 0.97 - 5.0 * sd && rate < p + 5.0 * sd,
            $sformatf("Eb/N0 %f dB: rate %f against %f", eb_db, rate, p));
      check(rate < prev_rate, "error rate falls with Eb/N0");
      prev_rate = rate;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
