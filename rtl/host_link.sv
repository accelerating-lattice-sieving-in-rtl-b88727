// host_link: one-reduction-per-transfer offload over the host data bus.
//
// The host streams a vector pair over a BUS_W-bit valid/ready bus and gets the
// reduced vector back on a second valid/ready bus. Per operation:
//   in : VW words of v, VW words of u (BUS_W/W coordinates per word, coordinate
//        i in word i/(BUS_W/W), lane i%(BUS_W/W), lane 0 in the low bits),
//        then one word ||v||^2 and one word ||u||^2 (zero-extended).
//   out: VW words of the reduced v, then one status word:
//        bit 31 reduced, bit 30 quotient clamped, bit 29 coordinate overflow,
//        bits NORM_W-1:0 the new ||v||^2.
// VW = ceil(N / (BUS_W/W)) = 30 for the default N = 120, W = 8, BUS_W = 32,
// so one reduction moves 2*30+2 words in and 31 words out, against 12 cycles
// of computation: the bus, not the arithmetic, limits the throughput.
//
// `idle` tells the top level when the bus may be handed to another function.
// The reduce engine is outside this module (req_* / rsp_* ports) so that it
// can be shared. While an operation is in flight or its result is still being
// sent, the next pair is already received; the link then waits (stall = 1,
// in_ready = 0) until the result buffer is free before it issues the next one.
//
// Sending every vector pair to the FPGA for each reduction over a 32-bit bus
// follows the design description; the word order, the norm and status words
// and the overlap of receive with compute and send are this design's choices.
module host_link
  import sieve_pkg::*;
#(
  parameter int unsigned N      = N_DIM,
  parameter int unsigned W      = COORD_W,
  parameter int unsigned BW     = BUS_W,
  parameter int unsigned NORM_W = dot_width(N, W)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host -> FPGA
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic        [BW-1:0]     in_data,
  // FPGA -> host
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic        [BW-1:0]     out_data,
  // reduce engine request
  output logic                     req_valid,
  output logic signed [W-1:0]      req_v [N],
  output logic signed [W-1:0]      req_u [N],
  output logic        [NORM_W-1:0] req_norm_v,
  output logic        [NORM_W-1:0] req_norm_u,
  // reduce engine response
  input  logic                     rsp_valid,
  input  logic signed [W-1:0]      rsp_v [N],
  input  logic        [NORM_W-1:0] rsp_norm,
  input  logic                     rsp_reduced,
  input  logic                     rsp_sat,
  input  logic                     rsp_ovf,
  // status
  output logic                     stall,   // a received pair waits for the engine or the sender
  output logic                     idle     // nothing received, in flight or being sent
);

  localparam int unsigned CPW = BW / W;
  localparam int unsigned VW  = vec_words(N, W, BW);
  localparam int unsigned CW  = $clog2(VW + 1);

  typedef enum logic [2:0] {RX_V, RX_U, RX_NV, RX_NU, ISSUE} rx_state_e;

  rx_state_e          rx_state;
  logic [CW-1:0]      rx_cnt;
  logic signed [W-1:0] rx_v [N];
  logic signed [W-1:0] rx_u [N];
  logic [NORM_W-1:0]  rx_nv, rx_nu;

  logic               in_flight;   // an operation is inside the reduce engine
  logic               tx_busy;     // the result buffer is being sent
  logic [CW-1:0]      tx_cnt;
  logic signed [W-1:0] tx_v [N];
  logic [BW-1:0]      tx_status;

  logic               issue;
  assign issue    = (rx_state == ISSUE) && !in_flight && !tx_busy;
  assign stall    = (rx_state == ISSUE) && !issue;
  assign in_ready = (rx_state != ISSUE);
  assign idle     = (rx_state == RX_V) && (rx_cnt == '0) && !in_flight && !tx_busy;

  // ---- receive ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_state <= RX_V;
      rx_cnt   <= '0;
    end else begin
      unique case (rx_state)
        RX_V: if (in_valid) begin
          if (rx_cnt == CW'(VW - 1)) begin rx_cnt <= '0; rx_state <= RX_U; end
          else rx_cnt <= rx_cnt + 1'b1;
        end
        RX_U: if (in_valid) begin
          if (rx_cnt == CW'(VW - 1)) begin rx_cnt <= '0; rx_state <= RX_NV; end
          else rx_cnt <= rx_cnt + 1'b1;
        end
        RX_NV: if (in_valid) rx_state <= RX_NU;
        RX_NU: if (in_valid) rx_state <= ISSUE;
        ISSUE: if (issue) rx_state <= RX_V;
        default: rx_state <= RX_V;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      for (int l = 0; l < CPW; l++) begin
        if (int'(rx_cnt) * CPW + l < N) begin
          if (rx_state == RX_V) rx_v[int'(rx_cnt) * CPW + l] <= in_data[l*W +: W];
          if (rx_state == RX_U) rx_u[int'(rx_cnt) * CPW + l] <= in_data[l*W +: W];
        end
      end
      if (rx_state == RX_NV) rx_nv <= in_data[NORM_W-1:0];
      if (rx_state == RX_NU) rx_nu <= in_data[NORM_W-1:0];
    end
  end

  assign req_valid  = issue;
  assign req_v      = rx_v;
  assign req_u      = rx_u;
  assign req_norm_v = rx_nv;
  assign req_norm_u = rx_nu;

  // ---- result buffer and transmit ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_flight <= 1'b0;
      tx_busy   <= 1'b0;
      tx_cnt    <= '0;
    end else begin
      if (issue)          in_flight <= 1'b1;
      else if (rsp_valid) in_flight <= 1'b0;
      if (rsp_valid && in_flight) begin
        tx_busy <= 1'b1;
        tx_cnt  <= '0;
      end else if (tx_busy && out_ready) begin
        if (tx_cnt == CW'(VW)) tx_busy <= 1'b0;
        else                   tx_cnt  <= tx_cnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rsp_valid && in_flight) begin
      tx_v      <= rsp_v;
      tx_status <= '0;
      tx_status[BW-1]       <= rsp_reduced;
      tx_status[BW-2]       <= rsp_sat;
      tx_status[BW-3]       <= rsp_ovf;
      tx_status[NORM_W-1:0] <= rsp_norm;
    end
  end

  always_comb begin
    out_valid = tx_busy;
    out_data  = '0;
    if (tx_cnt == CW'(VW)) out_data = tx_status;
    else begin
      for (int l = 0; l < CPW; l++)
        if (int'(tx_cnt) * CPW + l < N) out_data[l*W +: W] = tx_v[int'(tx_cnt) * CPW + l];
    end
  end

  initial assert (NORM_W <= BW - 3 && BW % W == 0)
    else $error("host_link: norm or coordinate width does not fit the bus word");

endmodule
