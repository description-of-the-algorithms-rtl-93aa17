// tb_conv_encoder: self-checking test of the rate 1/2 (7,5) encoder.
//
// 1. The worked example: data 010111001010001 must give the channel symbols
//    00 11 10 00 01 10 01 11 11 10 00 10 11 00 11 10 11, the last two pairs
//    from the two flush bits, as one unbroken stream of one symbol per clock
//    (34 symbols in 34 cycles), with sym_last on the final symbol only.
// 2. Random bursts checked against the next-state and output tables of the
//    K = 3 code, written here as literal tables, including the state after
//    every bit and a clear in the middle of a burst's stream of states.
import fec_pkg::*;
module tb_conv_encoder;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic in_valid = 1'b0, in_bit = 1'b0, in_last = 1'b0, in_ready;
  logic sym_valid, sym, sym_last, flushing;
  sel_t sym_sel;
  logic [1:0] pair, state;
  int checks = 0, failures = 0;

  conv_encoder dut (.*);

  always #5 clk = ~clk;

  // next-state and output tables of the K = 3, (7,5) code, index {state, input}
  localparam logic [1:0] NEXT_STATE [8] = '{2'b00, 2'b10, 2'b00, 2'b10, 2'b01, 2'b11, 2'b01, 2'b11};
  localparam logic [1:0] OUT_SYMS   [8] = '{2'b00, 2'b11, 2'b11, 2'b00, 2'b10, 2'b01, 2'b01, 2'b10};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // symbol collector
  logic sym_log [$];
  sel_t sel_log [$];
  logic last_log [$];
  always @(posedge clk) if (rst_n && sym_valid) begin
    sym_log.push_back(sym); sel_log.push_back(sym_sel); last_log.push_back(sym_last);
  end

  task automatic send_burst(input logic bits [$]);
    for (int i = 0; i < bits.size(); i++) begin
      in_valid <= 1'b1; in_bit <= bits[i]; in_last <= (i == bits.size() - 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 1'b0; in_last <= 1'b0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ex [$];
    string exp_str, got_str;
    int first_cycle, last_cycle, cyc;
    ex = '{0,1,0,1,1,1,0,0,1,0,1,0,0,0,1};
    exp_str = "0011100001100111111000101100111011";
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    clear <= 1'b1; @(posedge clk); clear <= 1'b0;
    #1 check(in_ready, "ready after clear");
    fork
      send_burst(ex);
      begin
        cyc = 0; first_cycle = -1; last_cycle = -1;
        while (last_cycle < 0) begin
          @(posedge clk); cyc++;
          if (sym_valid && first_cycle < 0) first_cycle = cyc;
          if (sym_valid && sym_last) last_cycle = cyc;
        end
      end
    join
    @(posedge clk);
    got_str = "";
    foreach (sym_log[i]) got_str = {got_str, sym_log[i] ? "1" : "0"};
    check(got_str == exp_str, $sformatf("example output %s, expected %s", got_str, exp_str));
    check(last_cycle - first_cycle + 1 == 34, $sformatf("example took %0d symbol cycles, expected 34", last_cycle - first_cycle + 1));
    for (int i = 0; i < sym_log.size(); i++) begin
      check(sel_log[i] == ((i % 2 == 0) ? SEL_A : SEL_B), "A/B selector order");
      check(last_log[i] == (i == sym_log.size() - 1), "sym_last position");
    end
    check(state == 2'b00, "flushed encoder ends in state 00");
    check(!flushing && !sym_valid, "idle after burst");

    // random bursts against the tables
    for (int b = 0; b < 20; b++) begin
      logic bits [$];
      logic [1:0] st;
      int n;
      n = 1 + ($urandom % 40);
      bits = {};
      for (int i = 0; i < n; i++) bits.push_back(1'($urandom));
      sym_log = {}; sel_log = {}; last_log = {};
      clear <= 1'b1; @(posedge clk); clear <= 1'b0;
      send_burst(bits);
      while (!(sym_valid && sym_last)) @(posedge clk);
      @(posedge clk);
      check(sym_log.size() == 2 * (n + 2), $sformatf("burst %0d: %0d symbols for %0d bits", b, sym_log.size(), n));
      st = 2'b00;
      for (int i = 0; i < n + 2; i++) begin
        logic u;
        logic [1:0] o;
        u = (i < n) ? bits[i] : 1'b0;
        o = OUT_SYMS[{st, u}];
        if (2 * i + 1 < sym_log.size())
          check({sym_log[2*i], sym_log[2*i+1]} == o,
                $sformatf("burst %0d bit %0d: state %b input %b gave %b%b, table %b", b, i, st, u, sym_log[2*i], sym_log[2*i+1], o));
        st = NEXT_STATE[{st, u}];
      end
      check(state == st && st == 2'b00, "state after flush");
    end

    // clear returns a loaded shift register to 00
    in_valid <= 1'b1; in_bit <= 1'b1; in_last <= 1'b0;
    @(posedge clk); while (!in_ready) @(posedge clk);
    in_valid <= 1'b0;
    @(posedge clk);
    check(state == 2'b10, "state 10 after a one");
    clear <= 1'b1; @(posedge clk); clear <= 1'b0; @(posedge clk);
    check(state == 2'b00 && !sym_valid, "clear empties the encoder");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
