// dot_product: pipelined inner product of two N-dimensional signed vectors.
//
// All N coordinate products are formed in parallel in one clock cycle (one
// multiplier per coordinate), then summed by a binary tree of two-input adders
// with a register after every tree level. The tree is padded to the next power
// of two with zeros, so it has ceil(log2 N) levels.
//
// Interface: in_valid/a/b are sampled on every rising clock edge; a new pair
// may be presented every cycle. out_valid/dot appear LATENCY = 1 + ceil(log2 N)
// cycles later (8 for N = 120). There is no back-pressure. Reset clears the
// valid pipeline only; the data registers need none.
//
// The parallel-multiplier-plus-adder-tree structure is the one the design
// description shows for the inner product; the two-input adders (rather than
// wider adders per level) and the register after every level are choices of
// this implementation.
module dot_product
  import sieve_pkg::*;
#(
  parameter int unsigned N     = N_DIM,
  parameter int unsigned W     = COORD_W,
  parameter int unsigned DOT_W = dot_width(N, W)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic signed [W-1:0]        a [N],
  input  logic signed [W-1:0]        b [N],
  output logic                       out_valid,
  output logic signed [DOT_W-1:0]    dot
);

  localparam int unsigned LEVELS  = tree_levels(N);
  localparam int unsigned P2      = 1 << LEVELS;
  localparam int unsigned LATENCY = 1 + LEVELS;

  // lvl[0] holds the products; lvl[k] holds the P2 >> k partial sums of level k.
  logic signed [DOT_W-1:0] lvl [LEVELS+1][P2];
  logic [LATENCY-1:0]      vpipe;

  // Multiplier stage.
  always_ff @(posedge clk) begin
    for (int i = 0; i < P2; i++) begin
      if (i < N) lvl[0][i] <= DOT_W'(a[i] * b[i]);
      else       lvl[0][i] <= '0;
    end
  end

  // Adder tree, one register per level.
  for (genvar k = 0; k < LEVELS; k++) begin : g_level
    always_ff @(posedge clk) begin
      for (int i = 0; i < P2; i++) begin
        if (i < (P2 >> (k + 1))) lvl[k+1][i] <= lvl[k][2*i] + lvl[k][2*i+1];
        else                     lvl[k+1][i] <= '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LATENCY-2:0], in_valid};
  end

  assign out_valid = vpipe[LATENCY-1];
  assign dot       = lvl[LEVELS][0];

endmodule
