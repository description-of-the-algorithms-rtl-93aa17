// tb_soft_quantizer: self-checking test of the 3-bit soft-decision quantizer.
//
// For random levels x and decision levels D the expected code is worked out
// in floating point: 3 - floor(x / D), limited to 0 .. 7, so that x >= 3D
// gives 0, 0 <= x < D gives 3, -D <= x < 0 gives 4 and x < -3D gives 7.  The
// hard decision must be 1 exactly when x < 0.  Levels right at the
// thresholds are tried on purpose, and every code must be seen.  The result
// must appear one cycle after the input.  A second quantizer with four bits
// (thresholds -7D .. 7D, expected code 7 - floor(x / D) in 0 .. 15) runs on
// the same inputs.
import fec_pkg::*;
module tb_soft_quantizer;
  logic   clk = 1'b0, rst_n = 1'b0;
  sigma_t d = '0;
  logic   in_valid = 1'b0, in_last = 1'b0;
  level_t x = '0;
  sel_t   in_sel = SEL_A;
  logic   q_valid, q_hard, q_last;
  logic [2:0] q_soft;
  sel_t   q_sel;
  int checks = 0, failures = 0;
  int seen [8];

  soft_quantizer #(.QBITS(3)) dut (.*);

  logic       q4_valid, q4_hard, q4_last;
  logic [3:0] q4_soft;
  sel_t       q4_sel;
  soft_quantizer #(.QBITS(4)) dut4 (
    .clk, .rst_n, .d, .in_valid, .x, .in_sel, .in_last,
    .q_valid(q4_valid), .q_soft(q4_soft), .q_hard(q4_hard), .q_sel(q4_sel), .q_last(q4_last)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_code(input int xv, input int dv, input int half);
    real f;
    int c;
    if (dv == 0) return (xv < 0) ? 2 * half - 1 : 0;
    f = $floor(real'(xv) / real'(dv));
    c = half - 1 - int'(f);
    if (c < 0) c = 0;
    if (c > 2 * half - 1) c = 2 * half - 1;
    return c;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 5000; i++) begin
      int xv, dv, e;
      dv = (i % 50 == 0) ? 0 : 1 + ($urandom % 300);
      if (i % 3 == 0) xv = (int'($urandom % 17) - 8) * dv - int'($urandom % 2);  // on or next to a threshold
      else            xv = int'($urandom % 4096) - 2048;
      if (xv > 2047) xv = 2047;
      if (xv < -2048) xv = -2048;
      d <= sigma_t'(dv); x <= level_t'(xv); in_valid <= 1'b1;
      in_sel <= sel_t'(i % 2); in_last <= (i % 7 == 0);
      @(posedge clk); #1;
      e = ref_code(xv, dv, 4);
      checks++;
      if (!q_valid || int'(q_soft) != e || q_hard != (xv < 0) || q_sel != sel_t'(i % 2) || q_last != (i % 7 == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL: x=%0d D=%0d gave %0d/%0d, expected %0d/%0d", xv, dv, q_soft, q_hard, e, xv < 0);
      end
      seen[q_soft]++;
      checks++;
      if (!q4_valid || int'(q4_soft) != ref_code(xv, dv, 8) || q4_hard != (xv < 0)) begin
        failures++;
        if (failures < 10) $display("FAIL: 4 bits: x=%0d D=%0d gave %0d, expected %0d", xv, dv, q4_soft, ref_code(xv, dv, 8));
      end
    end
    in_valid <= 1'b0;
    @(posedge clk); #1;
    checks++;
    if (q_valid) begin failures++; $display("FAIL: valid without input"); end
    for (int c = 0; c < 8; c++) begin
      checks++;
      if (seen[c] == 0) begin failures++; $display("FAIL: code %0d never produced", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
