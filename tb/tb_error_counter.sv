// tb_error_counter: self-checking test of the bit error counter.
//
// A random transmitted stream is returned as "decoded" bits after a random
// and varying delay of up to 40 bits, with bits flipped at random; the bit
// and error counts must equal the numbers worked out here.  Then the buffer
// is filled past its depth (overflow), a decoded bit is given with nothing
// pending (underflow), and clear must zero everything.
module tb_error_counter;
  localparam int DEPTH = 64;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic tx_valid = 1'b0, tx_bit = 1'b0, dec_valid = 1'b0, dec_bit = 1'b0;
  logic [31:0] bit_count, err_count;
  logic overflow, underflow, pending;
  int checks = 0, failures = 0;

  error_counter #(.DEPTH(DEPTH), .CNT_W(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic sent [$];
    int n_sent, n_dec, n_err;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    n_sent = 0; n_dec = 0; n_err = 0;
    while (n_dec < 5000) begin
      logic tv, tb, dv, db;
      tv = (n_sent < 5000) && ($urandom % 3 != 0) && (sent.size() < 40);
      tb = 1'($urandom);
      dv = (sent.size() > 0) && ($urandom % 3 != 0) && (sent.size() > 20 || n_sent >= 5000 || $urandom % 4 == 0);
      db = 1'b0;
      if (dv) begin
        logic s;
        s = sent.pop_front();
        db = s;
        if ($urandom % 10 == 0) begin db = ~s; n_err++; end
        n_dec++;
      end
      if (tv) begin sent.push_back(tb); n_sent++; end
      tx_valid <= tv; tx_bit <= tb; dec_valid <= dv; dec_bit <= db;
      @(posedge clk);
    end
    tx_valid <= 1'b0; dec_valid <= 1'b0;
    @(posedge clk); #1;
    check(bit_count == 32'(n_dec), $sformatf("bit count %0d, expected %0d", bit_count, n_dec));
    check(err_count == 32'(n_err), $sformatf("error count %0d, expected %0d", err_count, n_err));
    check(!overflow && !underflow && !pending, "no overflow, underflow or leftover bits");

    // overflow: DEPTH + 1 bits with no decoded bits
    for (int i = 0; i <= DEPTH; i++) begin
      tx_valid <= 1'b1; tx_bit <= 1'b1; @(posedge clk);
    end
    tx_valid <= 1'b0; @(posedge clk); #1;
    check(overflow, "overflow flagged");
    // drain DEPTH ones without errors
    for (int i = 0; i < DEPTH; i++) begin
      dec_valid <= 1'b1; dec_bit <= 1'b1; @(posedge clk);
    end
    dec_valid <= 1'b0; @(posedge clk); #1;
    check(err_count == 32'(n_err) && bit_count == 32'(n_dec + DEPTH), "buffer held DEPTH bits");
    check(!underflow && !pending, "drained");
    dec_valid <= 1'b1; @(posedge clk); dec_valid <= 1'b0; @(posedge clk); #1;
    check(underflow && bit_count == 32'(n_dec + DEPTH), "underflow flagged, not counted");
    clear <= 1'b1; @(posedge clk); clear <= 1'b0; #1;
    check(bit_count == 0 && err_count == 0 && !overflow && !underflow && !pending, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
