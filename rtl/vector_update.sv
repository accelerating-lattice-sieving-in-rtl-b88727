// vector_update: the value-update step of Reduce(v, u).
//
// Given the rounded quotient q (-4..4) it forms, for every coordinate in
// parallel, v_i' = v_i - q*u_i, and updates the squared norm without
// recomputing it:  ||v'||^2 = ||v||^2 + q^2*||u||^2 - 2*q*<v,u>.
// Because |q| is at most 4, q*u_i, q^2*||u||^2 and q*<v,u> are all made of
// shifts and adds of |q|'s bits, with the sign of q applied afterwards; no
// multiplier is used.
//
// Purely combinational; the reduce pipeline registers the result.
// The update formulas follow the Reduce algorithm of the design description.
// The coordinates are kept at W bits; a coordinate that does not fit after
// the update wraps and raises `ovf` (a choice of this design; the description
// does not say how coordinate growth is handled).
module vector_update
  import sieve_pkg::*;
#(
  parameter int unsigned N      = N_DIM,
  parameter int unsigned W      = COORD_W,
  parameter int unsigned DOT_W  = dot_width(N, W),
  parameter int unsigned NORM_W = dot_width(N, W)
) (
  input  logic signed [W-1:0]      v [N],
  input  logic signed [W-1:0]      u [N],
  input  logic signed [Q_W-1:0]    q,
  input  logic signed [DOT_W-1:0]  dot,
  input  logic        [NORM_W-1:0] norm_v,
  input  logic        [NORM_W-1:0] norm_u,
  output logic signed [W-1:0]      v_new [N],
  output logic        [NORM_W-1:0] norm_new,
  output logic                     ovf
);

  localparam int unsigned EW = W + 4;                                      // v - q*u
  localparam int unsigned NW = ((DOT_W > NORM_W) ? DOT_W : NORM_W) + 7;    // norm terms

  logic                  qneg;
  logic [2:0]            qmag;
  logic signed [EW-1:0]  ue, qu, diff;
  logic signed [NW-1:0]  nu, ad, q2nu, qdot, nsum;

  always_comb begin
    qneg = q[Q_W-1];
    qmag = 3'((qneg ? -q : q));

    ovf = 1'b0;
    for (int i = 0; i < N; i++) begin
      ue   = EW'(u[i]);
      qu   = (qmag[2] ? (ue <<< 2) : '0) + (qmag[1] ? (ue <<< 1) : '0) + (qmag[0] ? ue : '0);
      if (qneg) qu = -qu;
      diff = EW'(v[i]) - qu;
      v_new[i] = diff[W-1:0];
      if (diff != EW'(signed'(diff[W-1:0]))) ovf = 1'b1;
    end

    // |q|^2 * ||u||^2 : |q|^2 is 0, 1, 4, 9 or 16
    nu = NW'(norm_u);
    unique case (qmag)
      3'd1:    q2nu = nu;
      3'd2:    q2nu = nu <<< 2;
      3'd3:    q2nu = (nu <<< 3) + nu;
      3'd4:    q2nu = nu <<< 4;
      default: q2nu = '0;
    endcase
    // 2 * q * <v,u>
    ad   = NW'(dot);
    qdot = ((qmag[2] ? (ad <<< 2) : '0) + (qmag[1] ? (ad <<< 1) : '0) + (qmag[0] ? ad : '0)) <<< 1;
    if (qneg) qdot = -qdot;
    nsum = NW'(norm_v) + q2nu - qdot;
    norm_new = nsum[NORM_W-1:0];
  end

endmodule
