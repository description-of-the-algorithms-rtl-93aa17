// soft_quantizer: uniform soft-decision quantizer of received channel levels.
//
// The received level x (nominally +1 for a 0 symbol and -1 for a 1 symbol) is
// quantized to QBITS bits.  The 2**QBITS - 1 decision thresholds are the
// multiples k*D of the decision level D, k = -(2**(QBITS-1)-1) .. 2**(QBITS-1)-1,
// and the output is the number of thresholds above x.  For three bits:
//   x >= 3D -> 0 (confident 0)   ...   0 <= x < D -> 3,  -D <= x < 0 -> 4
//   ...   x < -3D -> 7 (confident 1).
// The most significant bit of that value is the one-bit hard decision
// (x < 0 gives 1, x >= 0 gives 0), which is also output on q_hard.
// D is normally 0.5 * sigma, where sigma is the noise standard deviation
// (the top module derives it that way); it is an unsigned input with FRAC_W
// fractional bits.
//
// Hard decisions, three-bit soft decisions as the usual precision, the
// uniform quantizer and D = 0.5 sigma follow the algorithm description; the
// exact placement of the thresholds at integer multiples of D, the code
// numbering (0 = confident zero) and the one-cycle register are this design's
// reading of the quantizer's transfer curve.
//
// Timing: x at cycle t gives q_soft/q_hard at cycle t+1, with the valid, A/B
// tag and burst-end flag carried along.
module soft_quantizer
  import fec_pkg::*;
#(
  parameter int QBITS = 3                 // soft-decision precision, 1 = hard decision
) (
  input  logic             clk,
  input  logic             rst_n,
  input  sigma_t           d,             // decision level D
  input  logic             in_valid,
  input  level_t           x,
  input  sel_t             in_sel,
  input  logic             in_last,
  output logic             q_valid,
  output logic [QBITS-1:0] q_soft,        // 0 .. 2**QBITS-1, larger means "more likely a 1"
  output logic             q_hard,        // hard decision: 1 if x < 0
  output sel_t             q_sel,
  output logic             q_last
);

  localparam int HALF = 1 << (QBITS - 1);   // thresholds -(HALF-1)*D .. (HALF-1)*D

  logic [QBITS-1:0] code;

  always_comb begin
    int above;
    above = 0;
    for (int k = -(HALF - 1); k <= HALF - 1; k++) begin
      if (32'(x) < k * $signed({1'b0, d})) above++;
    end
    code = QBITS'(above);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_valid <= 1'b0;
      q_soft  <= '0;
      q_hard  <= 1'b0;
      q_sel   <= SEL_A;
      q_last  <= 1'b0;
    end else begin
      q_valid <= in_valid;
      q_sel   <= in_sel;
      q_last  <= in_valid && in_last;
      if (in_valid) begin
        q_soft <= code;
        q_hard <= code[QBITS-1];
      end
    end
  end

  if (QBITS < 1 || QBITS > 8) begin : g_bad_q
    $error("soft_quantizer: QBITS must be 1 .. 8");
  end

endmodule
