// round_div: rounded division q = round(dot / ||u||^2) without a divider.
//
// The sign of the inner product is removed first and put back on the result.
// The magnitude is found by comparing 2*|dot| with odd multiples of ||u||^2:
//   2|dot| <= 1*nu          -> |q| = 0, no reduction
//   nu     <  2|dot| < 3*nu -> 1
//   3*nu   <= 2|dot| < 5*nu -> 2
//   5*nu   <= 2|dot| < 7*nu -> 3
//   7*nu   <= 2|dot|        -> 4
// Only |q| <= 4 is resolved: vectors whose norm is within four times the
// expected shortest norm never need more (Cauchy-Schwarz). Larger quotients are
// clamped to 4 and reported on `sat`, so the caller can repeat the reduction.
// The odd multiples are built from shifts and adds, not multipliers.
//
// Purely combinational; the reduce pipeline registers its outputs.
// The comparison table and the |q| <= 4 bound follow the design description.
// At exactly 2|dot| = nu the Reduce algorithm says "no reduction" while the
// comparison table would give 1; this module follows the algorithm. A zero
// ||u||^2 (a zero vector) never reduces. The `sat` flag is this design's own.
module round_div
  import sieve_pkg::*;
#(
  parameter int unsigned DOT_W  = dot_width(N_DIM, COORD_W),
  parameter int unsigned NORM_W = dot_width(N_DIM, COORD_W)
) (
  input  logic signed [DOT_W-1:0]  dot,     // <v,u>
  input  logic        [NORM_W-1:0] norm_u,  // ||u||^2
  output logic                     reduce,  // Reduce() returns true
  output logic signed [Q_W-1:0]    q,       // rounded quotient, -4..4
  output logic                     sat      // true quotient above 4.5, clamped
);

  localparam int unsigned CW = ((DOT_W > NORM_W) ? DOT_W : NORM_W) + 5;

  logic          neg;
  logic signed [CW-1:0] dext;
  logic [CW-1:0] two_abs, nu1, nu3, nu5, nu7, nu9;
  logic [2:0]    mag;

  always_comb begin
    neg     = dot[DOT_W-1];
    dext    = CW'(dot);
    two_abs = (neg ? -dext : dext) << 1;
    nu1     = CW'(norm_u);
    nu3     = (nu1 << 1) + nu1;
    nu5     = (nu1 << 2) + nu1;
    nu7     = (nu1 << 3) - nu1;
    nu9     = (nu1 << 3) + nu1;

    reduce = (norm_u != '0) && (two_abs > nu1);
    if (!reduce)             mag = 3'd0;
    else if (two_abs < nu3)  mag = 3'd1;
    else if (two_abs < nu5)  mag = 3'd2;
    else if (two_abs < nu7)  mag = 3'd3;
    else                     mag = 3'd4;
    sat = reduce && (two_abs >= nu9);

    q = neg ? -Q_W'(mag) : Q_W'(mag);
  end

endmodule
