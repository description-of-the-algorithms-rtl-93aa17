// tb_data_source: self-checking test of the random data bit source.
//
// A reference xorshift32 sequence from the same seed, computed here, gives
// the expected bits: a value at or above half of the 32-bit range is a 1.
// Bursts of random length are taken with random stalls on out_ready; every
// bit, the out_last flag, the burst length and busy are checked, and the
// share of ones over all bursts must be close to one half.
module tb_data_source;
  localparam logic [31:0] SEED = 32'h1234_5678;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, out_ready = 1'b0;
  logic [15:0] burst_len = '0;
  logic out_valid, out_bit, out_last, busy;
  int checks = 0, failures = 0;

  data_source #(.SEED(SEED), .LEN_W(16)) dut (.*);

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
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    int ones, total;
    r = SEED; ones = 0; total = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1 check(!busy && !out_valid, "idle after reset");
    for (int b = 0; b < 30; b++) begin
      int n, got;
      n = (b == 0) ? 0 : 1 + ($urandom % 300);
      burst_len <= 16'(n); start <= 1'b1;
      @(posedge clk); start <= 1'b0; burst_len <= '0;
      got = 0;
      while (got < n) begin
        out_ready <= ($urandom % 4) != 0;
        @(posedge clk);
        if (out_valid && out_ready) begin
          check(out_bit == r[31], $sformatf("burst %0d bit %0d", b, got));
          check(out_last == (got == n - 1), "out_last");
          ones += int'(out_bit); total++;
          r = ref_next(r);
          got++;
        end
      end
      out_ready <= 1'b0;
      @(posedge clk);
      #1 check(!busy && !out_valid, $sformatf("burst %0d of %0d bits ends", b, n));
    end
    check(total > 3000, "enough bits");
    check(ones * 100 > total * 46 && ones * 100 < total * 54,
          $sformatf("share of ones %0d of %0d", ones, total));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
