// uniform_rng: uniformly distributed 32-bit pseudo-random numbers.
//
// A 32-bit xorshift generator (x ^= x << 13; x ^= x >> 17; x ^= x << 5) runs
// through all 2**32 - 1 non-zero values before repeating.  The current value
// is on word; it moves to the next value on each clock with advance high.
// reseed loads SEED again, so a run can be repeated.  This is the hardware
// stand-in for the software uniform generator of a link simulation; the
// xorshift algorithm and the 32-bit width are this design's choices.
module uniform_rng #(
  parameter logic [31:0] SEED = 32'h2545_F491   // must not be zero
) (
  input  logic        clk,
  input  logic        rst_n,    // asynchronous reset to SEED
  input  logic        reseed,   // synchronous reload of SEED
  input  logic        advance,  // step to the next value
  output logic [31:0] word      // current uniform value, 1 .. 2**32-1
);

  logic [31:0] x_q;

  function automatic logic [31:0] xorshift32(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       x_q <= SEED;
    else if (reseed)  x_q <= SEED;
    else if (advance) x_q <= xorshift32(x_q);
  end

  assign word = x_q;

  if (SEED == 32'd0) begin : g_bad_seed
    $error("uniform_rng: SEED must not be zero");
  end

endmodule
