// sieve_top: lattice-sieving accelerator with a shared pipelined Reduce engine.
//
// One reduce_pipeline (the Reduce(v,u) operation of Gauss sieving) serves two
// ways of using the accelerator, selected by `mode`:
//   MODE_SINGLE - host_link: the host sends a vector pair for every reduction
//                 and receives the reduced vector; the sieve itself runs on
//                 the host.
//   MODE_SET    - set_sieve: the host loads a set of vectors, the set is
//                 reduced pairwise on chip, and the result is read back.
// Both share the host bus (BUS_W bits, valid/ready each way). `mode` is sampled
// only while both functions are idle, so a switch never cuts an operation in
// two; the active mode is shown on `mode_active`. Each request carries a tag
// through the engine: the mode in the top bit, so that the response goes back
// to the function that issued it, and, in set mode, the index of the target
// vector below it.
//
// The engine, the per-reduction offload and the on-chip set follow the design
// description; sharing one engine between them behind a mode switch is this
// design's choice.
module sieve_top
  import sieve_pkg::*;
#(
  parameter int unsigned N         = N_DIM,
  parameter int unsigned W         = COORD_W,
  parameter int unsigned BW        = BUS_W,
  parameter int unsigned SET_DEPTH = 256,
  parameter int unsigned NORM_W    = dot_width(N, W)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mode_e         mode,
  output mode_e         mode_active,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [BW-1:0] in_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [BW-1:0] out_data,
  output logic          link_stall,
  output logic          set_busy,
  output logic          set_sieving,
  output logic [31:0]   set_reductions,
  output logic [31:0]   set_pairs_issued,
  output logic [15:0]   set_passes
);

  localparam int unsigned AW = (SET_DEPTH > 1) ? $clog2(SET_DEPTH) : 1;

  mode_e mode_q;
  logic  link_idle;
  assign mode_active = mode_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      mode_q <= MODE_SINGLE;
    else if (link_idle && !set_busy) mode_q <= mode;
  end

  // ---- shared engine ----
  logic                     eng_in_valid, eng_out_valid, eng_reduced, eng_sat, eng_ovf;
  logic signed [W-1:0]      eng_v [N];
  logic signed [W-1:0]      eng_u [N];
  logic        [NORM_W-1:0] eng_nv, eng_nu, eng_norm;
  logic signed [W-1:0]      eng_out_v [N];
  logic        [AW:0]       eng_tag, eng_in_tag;
  logic        [AW-1:0]     ss_tag;

  reduce_pipeline #(.N(N), .W(W), .TAG_W(AW + 1), .NORM_W(NORM_W)) u_reduce (
    .clk, .rst_n,
    .in_valid   (eng_in_valid),
    .in_v       (eng_v),
    .in_u       (eng_u),
    .in_norm_v  (eng_nv),
    .in_norm_u  (eng_nu),
    .in_tag     (eng_in_tag),
    .out_valid  (eng_out_valid),
    .out_v      (eng_out_v),
    .out_norm   (eng_norm),
    .out_reduced(eng_reduced),
    .out_sat    (eng_sat),
    .out_ovf    (eng_ovf),
    .out_tag    (eng_tag)
  );

  // ---- per-reduction offload ----
  logic                     hl_in_valid, hl_in_ready, hl_out_valid, hl_out_ready, hl_req_valid;
  logic [BW-1:0]            hl_out_data;
  logic signed [W-1:0]      hl_v [N];
  logic signed [W-1:0]      hl_u [N];
  logic        [NORM_W-1:0] hl_nv, hl_nu;

  host_link #(.N(N), .W(W), .BW(BW), .NORM_W(NORM_W)) u_link (
    .clk, .rst_n,
    .in_valid   (hl_in_valid),
    .in_ready   (hl_in_ready),
    .in_data    (in_data),
    .out_valid  (hl_out_valid),
    .out_ready  (hl_out_ready),
    .out_data   (hl_out_data),
    .req_valid  (hl_req_valid),
    .req_v      (hl_v),
    .req_u      (hl_u),
    .req_norm_v (hl_nv),
    .req_norm_u (hl_nu),
    .rsp_valid  (eng_out_valid && eng_tag[AW] == 1'(MODE_SINGLE)),
    .rsp_v      (eng_out_v),
    .rsp_norm   (eng_norm),
    .rsp_reduced(eng_reduced),
    .rsp_sat    (eng_sat),
    .rsp_ovf    (eng_ovf),
    .stall      (link_stall),
    .idle       (link_idle)
  );

  // ---- on-chip set sieving ----
  logic                     ss_in_valid, ss_in_ready, ss_out_valid, ss_out_ready, ss_req_valid;
  logic [BW-1:0]            ss_out_data;
  logic signed [W-1:0]      ss_v [N];
  logic signed [W-1:0]      ss_u [N];
  logic        [NORM_W-1:0] ss_nv, ss_nu;

  set_sieve #(.N(N), .W(W), .BW(BW), .DEPTH(SET_DEPTH), .NORM_W(NORM_W), .AW(AW)) u_set (
    .clk, .rst_n,
    .in_valid    (ss_in_valid),
    .in_ready    (ss_in_ready),
    .in_data     (in_data),
    .out_valid   (ss_out_valid),
    .out_ready   (ss_out_ready),
    .out_data    (ss_out_data),
    .req_valid   (ss_req_valid),
    .req_v       (ss_v),
    .req_u       (ss_u),
    .req_norm_v  (ss_nv),
    .req_norm_u  (ss_nu),
    .req_tag     (ss_tag),
    .rsp_tag     (eng_tag[AW-1:0]),
    .rsp_valid   (eng_out_valid && eng_tag[AW] == 1'(MODE_SET)),
    .rsp_v       (eng_out_v),
    .rsp_norm    (eng_norm),
    .rsp_reduced (eng_reduced),
    .busy        (set_busy),
    .sieving     (set_sieving),
    .reductions  (set_reductions),
    .pairs_issued(set_pairs_issued),
    .passes      (set_passes)
  );

  // ---- mode multiplexing ----
  always_comb begin
    hl_in_valid  = in_valid  && (mode_q == MODE_SINGLE);
    ss_in_valid  = in_valid  && (mode_q == MODE_SET);
    hl_out_ready = out_ready && (mode_q == MODE_SINGLE);
    ss_out_ready = out_ready && (mode_q == MODE_SET);
    if (mode_q == MODE_SET) begin
      in_ready     = ss_in_ready;
      out_valid    = ss_out_valid;
      out_data     = ss_out_data;
      eng_in_valid = ss_req_valid;
      eng_v        = ss_v;
      eng_u        = ss_u;
      eng_nv       = ss_nv;
      eng_nu       = ss_nu;
      eng_in_tag   = {1'(MODE_SET), ss_tag};
    end else begin
      in_ready     = hl_in_ready;
      out_valid    = hl_out_valid;
      out_data     = hl_out_data;
      eng_in_valid = hl_req_valid;
      eng_v        = hl_v;
      eng_u        = hl_u;
      eng_nv       = hl_nv;
      eng_nu       = hl_nu;
      eng_in_tag   = {1'(MODE_SINGLE), AW'(0)};
    end
  end

endmodule
