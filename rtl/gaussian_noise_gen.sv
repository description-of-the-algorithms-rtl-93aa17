// gaussian_noise_gen: pairs of Gaussian noise samples with standard deviation sigma.
//
// Two uniform variables give two independent Gaussian samples through the
// Rayleigh distribution:
//   R = sigma * sqrt(2 * ln(1 / (1 - U)))      (Rayleigh, from uniform U)
//   G = R * cos(V),  H = R * sin(V)            (V uniform on [0, 2*pi))
// U and V are the top two TAB_BITS-bit fields of one 32-bit uniform word
// (uniform_rng).  Each field addresses a table: RTAB[i] holds
// sqrt(2 ln(1/(1-u))) and COSTAB[i] holds cos(2*pi*v) at the cell centre
// u = v = (i + 0.5) / 2**TAB_BITS; sin(V) is read from the same cosine table
// a quarter turn earlier.  Both tables are computed at elaboration from these
// formulas and become constant ROMs.  The two products sigma*R*cos(V) and
// sigma*R*sin(V) are rounded to the level format of fec_pkg and saturated.
//
// Because U is quantized to cell centres, |R| is at most
// sqrt(2 ln(2**(TAB_BITS+1))) (3.90 for TAB_BITS = 10): the far tail of the
// Gaussian is cut there.  The Rayleigh/uniform relations are the algorithm's;
// table sizes, number formats and the single shared uniform word are this
// design's choices.
//
// Timing: a new pair is drawn on every clock with next high and shows on g
// and h the following cycle.  After reset one pair is drawn by itself, so g
// and h are valid (valid high) from the second cycle on.  The drawn pair is
// held with unit variance and scaled by sigma after the register, so a
// change of sigma shows on g and h in the same cycle.  sigma is an unsigned
// fixed-point value with FRAC_W fractional bits.
module gaussian_noise_gen
  import fec_pkg::*;
#(
  parameter int          TAB_BITS = 10,            // address bits of U and V
  parameter logic [31:0] SEED     = 32'h9E37_79B9
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   reseed,     // restart the noise sequence
  input  sigma_t sigma,      // noise standard deviation
  input  logic   next,       // draw a new pair
  output logic   valid,
  output level_t g,          // sigma * R * cos(V), combinational in sigma
  output level_t h           // sigma * R * sin(V)
);

  localparam int N       = 1 << TAB_BITS;
  localparam int R_FRAC  = 10;                 // fractional bits of RTAB
  localparam int R_W     = R_FRAC + 2;         // RTAB holds values below 4.0
  localparam int T_FRAC  = 10;                 // fractional bits of COSTAB
  localparam int T_W     = T_FRAC + 2;         // signed, range [-1, +1]
  localparam int P_W     = SIGMA_W + R_W + T_W + 1;
  localparam int SHIFT   = R_FRAC + T_FRAC;    // product back to FRAC_W fractional bits
  localparam real PI     = 3.14159265358979323846;

  typedef logic        [R_W-1:0] r_t;
  typedef logic signed [T_W-1:0] t_t;
  typedef r_t r_tab_t [N];
  typedef t_t t_tab_t [N];

  function automatic r_tab_t make_rtab();
    r_tab_t tab;
    for (int i = 0; i < N; i++) begin
      real u;
      u      = (real'(i) + 0.5) / real'(N);
      tab[i] = r_t'($rtoi($sqrt(2.0 * $ln(1.0 / (1.0 - u))) * real'(1 << R_FRAC) + 0.5));
    end
    return tab;
  endfunction

  function automatic t_tab_t make_costab();
    t_tab_t tab;
    for (int i = 0; i < N; i++) begin
      real c;
      c      = $cos(2.0 * PI * (real'(i) + 0.5) / real'(N)) * real'(1 << T_FRAC);
      tab[i] = t_t'($rtoi(c >= 0.0 ? c + 0.5 : c - 0.5));
    end
    return tab;
  endfunction

  localparam r_tab_t RTAB   = make_rtab();
  localparam t_tab_t COSTAB = make_costab();

  logic [31:0]         word;
  logic                primed_q, draw;
  logic [TAB_BITS-1:0] u_idx, v_idx, s_idx;
  r_t                  r_val;
  t_t                  c_val, s_val;
  localparam int U_W = R_W + T_W + 1;          // R * cos product, signed
  logic signed [U_W-1:0] gu_q, hu_q;
  logic signed [P_W-1:0] g_prod, h_prod;

  assign draw = next || !primed_q;

  uniform_rng #(.SEED(SEED)) u_rng (
    .clk, .rst_n, .reseed, .advance(draw), .word
  );

  function automatic level_t round_sat(input logic signed [P_W-1:0] p);
    logic signed [P_W-1:0] r;
    r = (p + (P_W'(1) <<< (SHIFT - 1))) >>> SHIFT;
    return sat_level(32'(r));
  endfunction

  always_comb begin
    u_idx = word[31 -: TAB_BITS];
    v_idx = word[31-TAB_BITS -: TAB_BITS];
    s_idx = v_idx - TAB_BITS'(N / 4);          // sin(x) = cos(x - pi/2)
    r_val = RTAB[u_idx];
    c_val = COSTAB[v_idx];
    s_val = COSTAB[s_idx];
  end

  // Unit-variance pair R*cos(V), R*sin(V), drawn on next.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      primed_q <= 1'b0;
      gu_q     <= '0;
      hu_q     <= '0;
    end else begin
      if (reseed) primed_q <= 1'b0;
      else if (draw) begin
        primed_q <= 1'b1;
        gu_q     <= U_W'(signed'({1'b0, r_val})) * U_W'(c_val);
        hu_q     <= U_W'(signed'({1'b0, r_val})) * U_W'(s_val);
      end
    end
  end

  // Scaling by sigma follows the register, so a new sigma applies at once.
  always_comb begin
    g_prod = P_W'(gu_q) * P_W'(signed'({1'b0, sigma}));
    h_prod = P_W'(hu_q) * P_W'(signed'({1'b0, sigma}));
    g      = round_sat(g_prod);
    h      = round_sat(h_prod);
  end

  assign valid = primed_q;

  if (TAB_BITS < 2 || 2 * TAB_BITS > 32) begin : g_bad_tab
    $error("gaussian_noise_gen: TAB_BITS must be 2 .. 16");
  end

endmodule
