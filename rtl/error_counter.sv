// error_counter: bit error counting between transmitted and decoded data.
//
// Every data bit that enters the encoder is written into a first-in
// first-out buffer.  A decoder returns its decisions later, in the same
// order; each decoded bit is compared with the oldest buffered transmitted
// bit, which is then dropped.  bit_count counts the compared bits and
// err_count those that differ, so err_count / bit_count is the bit error
// rate.  The buffer lets the decoder have any latency up to DEPTH bits.
//
// overflow flags a transmitted bit that found the buffer full (it is lost),
// underflow a decoded bit that arrived with nothing to compare it with (it is
// not counted); both stay set until clear.  clear empties the buffer and
// zeroes the counters.  Comparing and counting is the algorithm's last step;
// the buffer, its depth and the counter widths are this design's choices.
//
// Timing: both inputs can be taken every cycle, also in the same cycle; the
// counters show a comparison one cycle after the decoded bit.
module error_counter #(
  parameter int DEPTH = 64,        // largest decoder latency, in data bits
  parameter int CNT_W = 32         // width of the counters
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             tx_valid,    // a data bit was sent
  input  logic             tx_bit,
  input  logic             dec_valid,   // a decoded data bit is available
  input  logic             dec_bit,
  output logic [CNT_W-1:0] bit_count,
  output logic [CNT_W-1:0] err_count,
  output logic             overflow,
  output logic             underflow,
  output logic             pending      // transmitted bits not yet compared
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic             mem [DEPTH];
  logic [AW-1:0]    wr_q, rd_q;
  logic [AW:0]      fill_q;
  logic             push, pop, full, empty;

  always_comb begin
    full  = (fill_q == (AW+1)'(DEPTH));
    empty = (fill_q == '0);
    pop   = dec_valid && !empty;
    push  = tx_valid && (!full || pop);
  end

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_q] <= tx_bit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q      <= '0;
      rd_q      <= '0;
      fill_q    <= '0;
      bit_count <= '0;
      err_count <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else if (clear) begin
      wr_q      <= '0;
      rd_q      <= '0;
      fill_q    <= '0;
      bit_count <= '0;
      err_count <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else begin
      if (push) wr_q <= inc(wr_q);
      if (pop)  rd_q <= inc(rd_q);
      fill_q <= fill_q + (AW+1)'(push) - (AW+1)'(pop);
      if (pop) begin
        bit_count <= bit_count + 1'b1;
        if (mem[rd_q] != dec_bit) err_count <= err_count + 1'b1;
      end
      if (tx_valid && !push)  overflow  <= 1'b1;
      if (dec_valid && empty) underflow <= 1'b1;
    end
  end

  assign pending = !empty;

endmodule
