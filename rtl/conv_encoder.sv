// conv_encoder: rate 1/2 convolutional encoder with SEL A/B output selector.
//
// A shift register of K-1 flip-flops holds the previous data bits.  The
// current input bit and the register contents form a K-bit window
// {input, left flip-flop, ..., right flip-flop}; the upper modulo-two adder
// XORs the window bits selected by G_UPPER and the lower one those selected
// by G_LOWER (octal 7 and 5 for the K = 3 code, i.e. upper = in^s1^s0 and
// lower = in^s0).  The shift register moves one place per data bit: the input
// enters the left flip-flop, whose old value moves right.  With the left
// flip-flop weighted 2**(K-2) the register value is the encoder state of the
// next-state and output tables.
//
// The output selector cycles through two states per data bit: first it puts
// the upper adder's symbol (A) on the channel, then the lower one's (B), so
// symbols leave at twice the bit rate, one per clock.  A data bit is taken
// (in_valid && in_ready) while the previous pair's B symbol is being sent or
// when the encoder is idle; its A symbol appears on sym the next cycle and its
// B symbol the cycle after.  A continuous input therefore runs at one bit per
// two clocks.
//
// Bursts: clear puts the shift register in the all-zeroes state (the start of
// a burst).  The bit accepted with in_last is followed by K-1 (= m) flush bits
// of value zero, generated internally while in_ready is low, which also
// returns the register to all zeroes; sym_last marks the final B symbol of
// the burst.  The structure, the codes and the flushing follow the algorithm
// description; the valid/ready handshake, the in_last flag and the
// one-symbol-per-clock timing are this design's choices.  There is no output
// back-pressure: the channel takes a symbol every cycle that sym_valid is high.
module conv_encoder
  import fec_pkg::*;
#(
  parameter int           K       = 3,        // constraint length
  parameter logic [K-1:0] G_UPPER = 3'o7,     // upper adder taps, MSB = current input
  parameter logic [K-1:0] G_LOWER = 3'o5      // lower adder taps
) (
  input  logic         clk,
  input  logic         rst_n,      // asynchronous reset, active low
  input  logic         clear,      // start of burst: clear shift register and selector
  // data bits
  input  logic         in_valid,
  input  logic         in_bit,
  input  logic         in_last,    // last data bit of the burst: flush afterwards
  output logic         in_ready,
  // channel symbols, one per clock
  output logic         sym_valid,
  output logic         sym,
  output sel_t         sym_sel,    // SEL_A: upper adder, SEL_B: lower adder
  output logic         sym_last,   // final symbol of the burst (after flushing)
  // observation
  output logic [1:0]   pair,       // {upper, lower} symbols of the current data bit
  output logic [K-2:0] state,      // shift register, left flip-flop is the MSB
  output logic         flushing    // zero bits are being clocked in
);

  localparam int M = K - 1;        // encoder memory

  logic [K-2:0]         sr_q;
  logic [1:0]           pair_q;
  logic                 have_q;
  sel_t                 sel_q;
  logic                 last_q;
  logic [$clog2(K):0]   flush_q;

  logic                 load_slot, take_in, take_flush, load, bit_in;
  logic [K-1:0]         window;
  logic                 up_sym, lo_sym;

  always_comb begin
    load_slot  = !have_q || (sel_q == SEL_B);
    take_in    = load_slot && (flush_q == '0) && in_valid;
    take_flush = load_slot && (flush_q != '0);
    load       = take_in || take_flush;
    bit_in     = take_flush ? 1'b0 : in_bit;
    window     = {bit_in, sr_q};
    up_sym     = ^(window & G_UPPER);
    lo_sym     = ^(window & G_LOWER);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_q    <= '0;
      pair_q  <= '0;
      have_q  <= 1'b0;
      sel_q   <= SEL_A;
      last_q  <= 1'b0;
      flush_q <= '0;
    end else if (clear) begin
      sr_q    <= '0;
      have_q  <= 1'b0;
      sel_q   <= SEL_A;
      last_q  <= 1'b0;
      flush_q <= '0;
    end else begin
      if (load) begin
        pair_q <= {up_sym, lo_sym};
        sr_q   <= {bit_in, sr_q[K-2:1]};
        have_q <= 1'b1;
        sel_q  <= SEL_A;
        last_q <= take_flush && (flush_q == 1);
        if (take_in && in_last) flush_q <= ($clog2(K)+1)'(M);
        else if (take_flush)    flush_q <= flush_q - 1'b1;
      end else if (have_q) begin
        if (sel_q == SEL_A) sel_q  <= SEL_B;
        else                have_q <= 1'b0;
      end
    end
  end

  always_comb begin
    in_ready  = load_slot && (flush_q == '0) && !clear;
    sym_valid = have_q;
    sym       = (sel_q == SEL_A) ? pair_q[1] : pair_q[0];
    sym_sel   = sel_q;
    sym_last  = have_q && last_q && (sel_q == SEL_B);
    pair      = pair_q;
    state     = sr_q;
    flushing  = (flush_q != '0);
  end

  // Elaboration-time check of the configuration.
  if (K < 2) begin : g_bad_k
    $error("conv_encoder: K must be at least 2");
  end

  // A data bit offered but not taken must be held until it is taken.
  a_hold_input: assert property (@(posedge clk) disable iff (!rst_n || clear)
    (in_valid && !in_ready) |=> in_valid)
    else $error("conv_encoder: in_valid dropped before the bit was taken");

endmodule
