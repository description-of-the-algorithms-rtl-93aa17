// tb_symbol_mapper: exhaustive test of the antipodal mapping y = 1 - 2x.
// Symbol 0 must give +1.0 and symbol 1 must give -1.0 in the fixed-point
// level format (1.0 = 2**FRAC_W), with valid, A/B tag and last flag kept.
import fec_pkg::*;
module tb_symbol_mapper;
  logic   sym_valid, sym, sym_last, lvl_valid, lvl_last;
  sel_t   sym_sel, lvl_sel;
  level_t lvl;
  int checks = 0, failures = 0;

  symbol_mapper dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      int expected;
      {sym_valid, sym, sym_last} = 3'(i);
      sym_sel = sel_t'(i >> 3);
      #1;
      expected = (1 - 2 * int'(sym)) * (1 << FRAC_W);
      checks++;
      if (int'(lvl) != expected || lvl_valid != sym_valid || lvl_last != sym_last || lvl_sel != sym_sel) begin
        failures++;
        $display("FAIL: symbol %0d gave %0d, expected %0d", sym, lvl, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
