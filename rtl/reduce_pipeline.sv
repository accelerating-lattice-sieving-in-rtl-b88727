// reduce_pipeline: fully pipelined Reduce(v, u) operation of lattice sieving.
//
// Reduce(v, u) computes dot = <v,u>; if 2|dot| <= ||u||^2 nothing changes and
// the result is "not reduced"; otherwise q = round(dot/||u||^2) and
// v <- v - q*u, ||v||^2 <- ||v||^2 + q^2||u||^2 - 2q*dot.
//
// Structure (one register stage each unless noted):
//   input register -> dot_product (1 multiply stage + ceil(log2 N) adder-tree
//   stages) -> round_div -> vector_update -> output register.
// v, u, the two squared norms and a user tag travel alongside the inner
// product in delay lines so that every stage holds one independent operation.
//
// Interface: present in_valid with v, u, ||v||^2, ||u||^2 and a tag; a new
// operation is accepted every clock cycle (no back-pressure). out_valid and
// the result appear LATENCY = 5 + ceil(log2 N) cycles later (12 cycles for
// N = 120). out_v/out_norm equal the inputs when out_reduced is low.
// out_sat: the quotient was clamped to 4 (apply Reduce again).
// out_ovf: a coordinate of v - q*u did not fit in W bits.
//
// The Reduce algorithm, the three sub-units and the pipelined organisation
// come from the design description; the tag, the flags, and the exact split
// of the stages are choices of this implementation.
module reduce_pipeline
  import sieve_pkg::*;
#(
  parameter int unsigned N      = N_DIM,
  parameter int unsigned W      = COORD_W,
  parameter int unsigned TAG_W  = 16,
  parameter int unsigned DOT_W  = dot_width(N, W),
  parameter int unsigned NORM_W = dot_width(N, W)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [W-1:0]      in_v [N],
  input  logic signed [W-1:0]      in_u [N],
  input  logic        [NORM_W-1:0] in_norm_v,
  input  logic        [NORM_W-1:0] in_norm_u,
  input  logic        [TAG_W-1:0]  in_tag,
  output logic                     out_valid,
  output logic signed [W-1:0]      out_v [N],
  output logic        [NORM_W-1:0] out_norm,
  output logic                     out_reduced,
  output logic                     out_sat,
  output logic                     out_ovf,
  output logic        [TAG_W-1:0]  out_tag
);

  localparam int unsigned DP_LAT  = 1 + tree_levels(N);
  localparam int unsigned LATENCY = reduce_latency(N);

  // ---- stage 1: input register ----
  logic                     s1_valid;
  logic signed [W-1:0]      s1_v [N];
  logic signed [W-1:0]      s1_u [N];
  logic        [NORM_W-1:0] s1_nv, s1_nu;
  logic        [TAG_W-1:0]  s1_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
  end
  always_ff @(posedge clk) begin
    s1_v   <= in_v;
    s1_u   <= in_u;
    s1_nv  <= in_norm_v;
    s1_nu  <= in_norm_u;
    s1_tag <= in_tag;
  end

  // ---- inner product, DP_LAT stages ----
  logic                    dp_valid;
  logic signed [DOT_W-1:0] dp_dot;

  dot_product #(.N(N), .W(W), .DOT_W(DOT_W)) u_dot (
    .clk, .rst_n,
    .in_valid (s1_valid),
    .a        (s1_v),
    .b        (s1_u),
    .out_valid(dp_valid),
    .dot      (dp_dot)
  );

  // Operands wait for the inner product in a delay line of DP_LAT stages.
  logic signed [W-1:0]      dl_v   [DP_LAT][N];
  logic signed [W-1:0]      dl_u   [DP_LAT][N];
  logic        [NORM_W-1:0] dl_nv  [DP_LAT];
  logic        [NORM_W-1:0] dl_nu  [DP_LAT];
  logic        [TAG_W-1:0]  dl_tag [DP_LAT];

  always_ff @(posedge clk) begin
    dl_v[0]   <= s1_v;
    dl_u[0]   <= s1_u;
    dl_nv[0]  <= s1_nv;
    dl_nu[0]  <= s1_nu;
    dl_tag[0] <= s1_tag;
    for (int k = 1; k < DP_LAT; k++) begin
      dl_v[k]   <= dl_v[k-1];
      dl_u[k]   <= dl_u[k-1];
      dl_nv[k]  <= dl_nv[k-1];
      dl_nu[k]  <= dl_nu[k-1];
      dl_tag[k] <= dl_tag[k-1];
    end
  end

  // ---- rounded division, registered ----
  logic                    rd_reduce, rd_sat;
  logic signed [Q_W-1:0]   rd_q;

  round_div #(.DOT_W(DOT_W), .NORM_W(NORM_W)) u_div (
    .dot   (dp_dot),
    .norm_u(dl_nu[DP_LAT-1]),
    .reduce(rd_reduce),
    .q     (rd_q),
    .sat   (rd_sat)
  );

  logic                     s3_valid, s3_reduce, s3_sat;
  logic signed [Q_W-1:0]    s3_q;
  logic signed [DOT_W-1:0]  s3_dot;
  logic signed [W-1:0]      s3_v [N];
  logic signed [W-1:0]      s3_u [N];
  logic        [NORM_W-1:0] s3_nv, s3_nu;
  logic        [TAG_W-1:0]  s3_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s3_valid <= 1'b0;
    else        s3_valid <= dp_valid;
  end
  always_ff @(posedge clk) begin
    s3_reduce <= rd_reduce;
    s3_sat    <= rd_sat;
    s3_q      <= rd_q;
    s3_dot    <= dp_dot;
    s3_v      <= dl_v[DP_LAT-1];
    s3_u      <= dl_u[DP_LAT-1];
    s3_nv     <= dl_nv[DP_LAT-1];
    s3_nu     <= dl_nu[DP_LAT-1];
    s3_tag    <= dl_tag[DP_LAT-1];
  end

  // ---- value update, registered ----
  logic signed [W-1:0]      up_v [N];
  logic        [NORM_W-1:0] up_norm;
  logic                     up_ovf;

  vector_update #(.N(N), .W(W), .DOT_W(DOT_W), .NORM_W(NORM_W)) u_upd (
    .v       (s3_v),
    .u       (s3_u),
    .q       (s3_q),
    .dot     (s3_dot),
    .norm_v  (s3_nv),
    .norm_u  (s3_nu),
    .v_new   (up_v),
    .norm_new(up_norm),
    .ovf     (up_ovf)
  );

  logic                     s4_valid, s4_reduced, s4_sat, s4_ovf;
  logic signed [W-1:0]      s4_v [N];
  logic        [NORM_W-1:0] s4_norm;
  logic        [TAG_W-1:0]  s4_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s4_valid  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      s4_valid  <= s3_valid;
      out_valid <= s4_valid;
    end
  end
  always_ff @(posedge clk) begin
    s4_v       <= up_v;
    s4_norm    <= up_norm;
    s4_reduced <= s3_reduce;
    s4_sat     <= s3_sat;
    s4_ovf     <= s3_reduce & up_ovf;
    s4_tag     <= s3_tag;
    // output register
    out_v       <= s4_v;
    out_norm    <= s4_norm;
    out_reduced <= s4_reduced;
    out_sat     <= s4_sat;
    out_ovf     <= s4_ovf;
    out_tag     <= s4_tag;
  end

  // The stage count above must match the latency the package advertises.
  initial assert (1 + DP_LAT + 3 == LATENCY)
    else $error("reduce_pipeline: stage count does not match reduce_latency()");

endmodule
