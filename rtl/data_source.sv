// data_source: random data bits for a burst through the coded link.
//
// A uniform 32-bit pseudo-random number U (uniform_rng) is turned into one
// data bit by comparing it with half of the generator's range: a value below
// half of the maximum gives a 0, a value at or above it gives a 1.  For the
// 32-bit generator that comparison is just the top bit of U.
//
// start (while idle) begins a burst of burst_len bits (burst_len = 0 sends
// nothing).  Bits are offered with a valid/ready handshake; out_last marks the
// final bit of the burst, and the next random number is drawn for every bit
// taken.  The threshold rule follows the algorithm description; the generator,
// the handshake and the burst control are this design's choices.
module data_source #(
  parameter logic [31:0] SEED  = 32'h2545_F491,
  parameter int          LEN_W = 16             // width of the burst length
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,      // begin a burst (ignored while busy)
  input  logic [LEN_W-1:0] burst_len,  // number of data bits in the burst
  output logic             out_valid,
  output logic             out_bit,
  output logic             out_last,
  input  logic             out_ready,
  output logic             busy
);

  localparam logic [31:0] HALF_RANGE = 32'h8000_0000;  // half of 2**32

  logic [31:0]      u;
  logic [LEN_W-1:0] left_q;       // bits still to send
  logic             take;

  assign take = out_valid && out_ready;

  uniform_rng #(.SEED(SEED)) u_rng (
    .clk, .rst_n, .reseed(1'b0), .advance(take), .word(u)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                             left_q <= '0;
    else if (start && left_q == '0)         left_q <= burst_len;
    else if (take)                          left_q <= left_q - 1'b1;
  end

  always_comb begin
    busy      = (left_q != '0);
    out_valid = busy;
    out_bit   = (u >= HALF_RANGE);
    out_last  = (left_q == LEN_W'(1));
  end

endmodule
