// set_sieve: sieves a whole set of lattice vectors inside the FPGA, keeping
// the reduce pipeline full.
//
// Instead of sending every vector pair for each reduction, the host loads a
// set once, the set is reduced on chip until it is pairwise (Gauss) reduced or
// a reduction budget is reached, and the set is read back. This amortises the
// host transfer over many reductions.
//
// Bus protocol (BUS_W-bit valid/ready in both directions):
//   in : header word {budget[31:16], count[15:0]}, then for each of the count
//        vectors VW coordinate words (same packing as host_link) and one word
//        holding its squared norm. budget = 0 means "until a full pass makes
//        no reduction".
//   out: for each vector VW coordinate words and its squared norm, then one
//        status word holding the number of successful reductions.
//
// Schedule. A pass is a sequence of sweeps, one per reducer j = 0..count-1.
// In sweep j the reducer L[j] is held on RAM read port b and every target
// i != j with 0 < ||L[j]||^2 <= ||L[i]||^2 (the shorter vector reduces the
// longer one; zero vectors are left alone) is streamed into the reduce engine,
// one per clock; the other targets cost one idle cycle. Within a sweep the
// operations are independent: each target occurs once and the reducer is
// never written, so no operation can see stale data. A reduced L[i] and its
// norm are written back when its result leaves the engine (the engine tag
// carries i). At the end of a sweep the engine is drained (LATENCY cycles)
// before the next reducer is read. A sweep over K vectors therefore takes
// about K + LATENCY + 3 cycles whatever the number of reductions.
// Passes repeat while the last one reduced something; the budget is checked
// before each sweep, so a run performs at least `budget` reductions unless
// the set becomes reduced first.
//
// Storing the set on chip, running many reductions per transfer, and using
// the pipelined engine to compute a Gauss-reduced set come from the design
// description; the sweep order, the norm filter, the stopping rule and the
// protocol are this design's choices.
module set_sieve
  import sieve_pkg::*;
#(
  parameter int unsigned N      = N_DIM,
  parameter int unsigned W      = COORD_W,
  parameter int unsigned BW     = BUS_W,
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned NORM_W = dot_width(N, W),
  parameter int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic        [BW-1:0]     in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic        [BW-1:0]     out_data,
  output logic                     req_valid,
  output logic signed [W-1:0]      req_v [N],
  output logic signed [W-1:0]      req_u [N],
  output logic        [NORM_W-1:0] req_norm_v,
  output logic        [NORM_W-1:0] req_norm_u,
  output logic        [AW-1:0]     req_tag,      // target index of the request
  input  logic                     rsp_valid,
  input  logic        [AW-1:0]     rsp_tag,      // target index of the response
  input  logic signed [W-1:0]      rsp_v [N],
  input  logic        [NORM_W-1:0] rsp_norm,
  input  logic                     rsp_reduced,
  // status
  output logic                     busy,         // an operation is under way
  output logic                     sieving,      // reduction passes running
  output logic        [31:0]       reductions,   // successful reductions so far
  output logic        [31:0]       pairs_issued, // pairs sent to the engine
  output logic        [15:0]       passes        // sieving passes done
);

  localparam int unsigned CPW = BW / W;
  localparam int unsigned VW  = vec_words(N, W, BW);
  localparam int unsigned CW  = $clog2(VW + 1);
  localparam int unsigned KW  = $clog2(DEPTH + 1);
  localparam int unsigned VB  = N * W;

  typedef enum logic [3:0] {
    S_HDR, S_LD_VEC, S_LD_NORM,
    S_SWEEP_START, S_SWEEP, S_DRAIN, S_PASS,
    S_OUT_RD, S_OUT_LD, S_OUT_VEC, S_OUT_NORM, S_OUT_STAT
  } state_e;

  state_e              state;
  logic [KW-1:0]       count;
  logic [15:0]         budget;
  logic [AW-1:0]       vi, vj;           // target and reducer indices
  logic [CW-1:0]       wcnt;             // word within a vector
  logic                any_red;
  logic signed [W-1:0] buf_v [N];        // load / unload vector buffer
  logic [NORM_W-1:0]   norms [DEPTH];

  // ---- vector memory ----
  logic               ram_we;
  logic [AW-1:0]      ram_waddr, ram_ra, ram_rb;
  logic [VB-1:0]      ram_wdata, ram_qa, ram_qb;

  vector_ram #(.DEPTH(DEPTH), .WIDTH(VB), .AW(AW)) u_ram (
    .clk,
    .wr_en    (ram_we),
    .wr_addr  (ram_waddr),
    .wr_data  (ram_wdata),
    .rd_a_addr(ram_ra),
    .rd_a_data(ram_qa),
    .rd_b_addr(ram_rb),
    .rd_b_data(ram_qb)
  );

  function automatic logic [VB-1:0] pack(input logic signed [W-1:0] x [N]);
    logic [VB-1:0] r;
    for (int i = 0; i < N; i++) r[i*W +: W] = x[i];
    return r;
  endfunction

  always_comb begin
    for (int i = 0; i < N; i++) begin
      req_v[i] = ram_qa[i*W +: W];
      req_u[i] = ram_qb[i*W +: W];
    end
  end

  // ---- helpers ----
  logic last_word, last_vec, last_i, last_j, pair_ok, budget_left;
  assign last_word   = (wcnt == CW'(VW - 1));
  assign last_vec    = (KW'(vi) == count - 1'b1);
  assign last_i      = last_vec;
  assign last_j      = (KW'(vj) == count - 1'b1);
  assign pair_ok     = (vi != vj) && (norms[vj] != '0) && (norms[vj] <= norms[vi]);
  assign budget_left = (budget == '0) || (reductions < 32'(budget));

  // Issue stage: a target chosen in S_SWEEP is read from port a and sent to
  // the engine one cycle later, together with the reducer from port b.
  logic              iss_valid;
  logic [AW-1:0]     iss_idx;
  logic [NORM_W-1:0] iss_norm;
  logic [7:0]        in_flight;       // requests inside the engine

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) iss_valid <= 1'b0;
    else        iss_valid <= (state == S_SWEEP) && pair_ok;
  end
  always_ff @(posedge clk) begin
    iss_idx  <= vi;
    iss_norm <= norms[vi];
  end

  assign in_ready  = (state == S_HDR) || (state == S_LD_VEC) || (state == S_LD_NORM);
  assign busy      = (state != S_HDR);
  assign sieving   = (state == S_SWEEP_START) || (state == S_SWEEP) ||
                     (state == S_DRAIN) || (state == S_PASS);
  assign req_valid  = iss_valid;
  assign req_norm_v = iss_norm;
  assign req_norm_u = norms[vj];
  assign req_tag    = iss_idx;

  always_comb begin
    ram_we    = 1'b0;
    ram_waddr = vi;
    ram_wdata = pack(buf_v);
    ram_ra    = vi;
    ram_rb    = vj;
    if (state == S_LD_NORM && in_valid) ram_we = 1'b1;
    if (rsp_valid && rsp_reduced) begin
      ram_we    = 1'b1;
      ram_waddr = rsp_tag;
      ram_wdata = pack(rsp_v);
    end
  end

  // ---- output word ----
  always_comb begin
    out_valid = (state == S_OUT_VEC) || (state == S_OUT_NORM) || (state == S_OUT_STAT);
    out_data  = '0;
    unique case (state)
      S_OUT_VEC:
        for (int l = 0; l < CPW; l++)
          if (int'(wcnt) * CPW + l < N) out_data[l*W +: W] = buf_v[int'(wcnt) * CPW + l];
      S_OUT_NORM: out_data = BW'(norms[vi]);
      S_OUT_STAT: out_data = BW'(reductions);
      default: ;
    endcase
  end

  // ---- control ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_HDR;
      count        <= '0;
      budget       <= '0;
      vi           <= '0;
      vj           <= '0;
      wcnt         <= '0;
      any_red      <= 1'b0;
      reductions   <= '0;
      pairs_issued <= '0;
      passes       <= '0;
      in_flight    <= '0;
    end else begin
      unique case (state)
        S_HDR: if (in_valid) begin
          count        <= (KW'(in_data[15:0]) > KW'(DEPTH)) ? KW'(DEPTH) : KW'(in_data[15:0]);
          budget       <= in_data[31:16];
          vi           <= '0;
          vj           <= '0;
          wcnt         <= '0;
          reductions   <= '0;
          pairs_issued <= '0;
          passes       <= '0;
          any_red      <= 1'b0;
          state        <= (in_data[15:0] == '0) ? S_OUT_STAT : S_LD_VEC;
        end
        S_LD_VEC: if (in_valid) begin
          wcnt <= last_word ? '0 : wcnt + 1'b1;
          if (last_word) state <= S_LD_NORM;
        end
        S_LD_NORM: if (in_valid) begin
          if (last_vec) begin
            vi    <= '0;
            vj    <= '0;
            state <= S_SWEEP_START;
          end else begin
            vi    <= vi + 1'b1;
            state <= S_LD_VEC;
          end
        end
        S_SWEEP_START: begin
          vi <= '0;
          if (!budget_left)            state <= S_OUT_RD;
          else if (norms[vj] == '0)    state <= S_DRAIN;   // a zero vector reduces nothing
          else                         state <= S_SWEEP;
        end
        S_SWEEP: begin
          if (last_i) begin vi <= '0; state <= S_DRAIN; end
          else vi <= vi + 1'b1;
        end
        S_DRAIN: if (!iss_valid && in_flight == '0 && !rsp_valid) begin
          if (last_j) state <= S_PASS;
          else begin vj <= vj + 1'b1; state <= S_SWEEP_START; end
        end
        S_PASS: begin
          passes  <= passes + 1'b1;
          any_red <= 1'b0;
          vj      <= '0;
          vi      <= '0;
          if (any_red && budget_left) state <= S_SWEEP_START;
          else                        state <= S_OUT_RD;
        end
        S_OUT_RD: state <= S_OUT_LD;
        S_OUT_LD: begin wcnt <= '0; state <= S_OUT_VEC; end
        S_OUT_VEC: if (out_ready) begin
          wcnt <= last_word ? '0 : wcnt + 1'b1;
          if (last_word) state <= S_OUT_NORM;
        end
        S_OUT_NORM: if (out_ready) begin
          if (last_vec) state <= S_OUT_STAT;
          else begin vi <= vi + 1'b1; state <= S_OUT_RD; end
        end
        S_OUT_STAT: if (out_ready) state <= S_HDR;
        default: state <= S_HDR;
      endcase
      // engine bookkeeping, in any state
      if (iss_valid) pairs_issued <= pairs_issued + 1'b1;
      in_flight <= in_flight + 8'(iss_valid) - 8'(rsp_valid);
      if (rsp_valid && rsp_reduced) begin
        reductions <= reductions + 1'b1;
        any_red    <= 1'b1;
      end
    end
  end

  // ---- data registers ----
  always_ff @(posedge clk) begin
    if (state == S_LD_VEC && in_valid)
      for (int l = 0; l < CPW; l++)
        if (int'(wcnt) * CPW + l < N) buf_v[int'(wcnt) * CPW + l] <= in_data[l*W +: W];
    if (state == S_OUT_LD)
      for (int i = 0; i < N; i++) buf_v[i] <= ram_qa[i*W +: W];
    if (state == S_LD_NORM && in_valid) norms[vi] <= in_data[NORM_W-1:0];
    if (rsp_valid && rsp_reduced) norms[rsp_tag] <= rsp_norm;
  end

  // A response may only arrive while a request is in the engine.
  assert property (@(posedge clk) disable iff (!rst_n) rsp_valid |-> in_flight != '0)
    else $error("set_sieve: unexpected response from the reduce engine");

endmodule
