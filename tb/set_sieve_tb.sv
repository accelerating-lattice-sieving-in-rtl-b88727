// set_sieve_tb: set_sieve with a real reduce_pipeline, at N = 8 and a 16-entry
// set to keep the run short. A set is loaded over the bus, sieved on chip and
// read back. The result is compared with a software run of the same pass
// order, and checked directly: after an unlimited run every pair must be
// Gauss reduced (2|<vi,vj>| <= ||vj||^2 whenever 0 < ||vj|| <= ||vi||). A
// second run with a reduction budget checks that sieving stops early.
module set_sieve_tb;
  import sieve_pkg::*;
  import sieve_ref_pkg::*;

  localparam int unsigned N      = 8;
  localparam int unsigned W      = 8;
  localparam int unsigned BW     = 32;
  localparam int unsigned DEPTH  = 16;
  localparam int unsigned NORM_W = dot_width(N, W);
  localparam int unsigned VW     = N / (BW / W);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     in_valid, in_ready, out_valid, out_ready;
  logic [BW-1:0]            in_data, out_data;
  logic                     req_valid, rsp_valid, rsp_reduced, rsp_sat, rsp_ovf;
  logic signed [W-1:0]      req_v [N];
  logic signed [W-1:0]      req_u [N];
  logic signed [W-1:0]      rsp_v [N];
  logic        [NORM_W-1:0] req_norm_v, req_norm_u, rsp_norm;
  logic                     busy, sieving;
  logic [31:0]              reductions, pairs_issued;
  logic [15:0]              passes;
  logic [3:0]               req_tag, rsp_tag;

  set_sieve #(.N(N), .W(W), .BW(BW), .DEPTH(DEPTH)) dut (.*);

  reduce_pipeline #(.N(N), .W(W), .TAG_W(4)) u_eng (
    .clk, .rst_n,
    .in_valid(req_valid), .in_v(req_v), .in_u(req_u),
    .in_norm_v(req_norm_v), .in_norm_u(req_norm_u), .in_tag(req_tag),
    .out_valid(rsp_valid), .out_v(rsp_v), .out_norm(rsp_norm),
    .out_reduced(rsp_reduced), .out_sat(rsp_sat), .out_ovf(rsp_ovf), .out_tag(rsp_tag));

  int checks = 0, failures = 0;
  int sieve_cycles = 0, back_to_back = 0;
  logic prev_req = 1'b0;
  always @(posedge clk) begin
    if (sieving) sieve_cycles++;
    if (req_valid && prev_req) back_to_back++;
    prev_req <= req_valid;
  end

  task automatic send_word(input logic [BW-1:0] d);
    in_valid = 1'b1; in_data = d;
    do @(posedge clk); while (!in_ready);
    #1 in_valid = 1'b0;
  endtask

  task automatic recv_word(output logic [BW-1:0] d);
    out_ready = 1'b1;
    do @(posedge clk); while (!out_valid);
    d = out_data;
    #1 out_ready = 1'b0;
  endtask

  task automatic run(input int k, input int budget, input bit dup);
    int set[$][], hw[$][];
    int hw_norm[$];
    int red, issued, npass;
    logic [BW-1:0] d;
    for (int s = 0; s < k; s++) begin
      int x[];
      x = new[N];
      foreach (x[i]) x[i] = int'($urandom_range(0, 40)) - 20;
      if (dup && s == k - 1) x = set[0];
      set.push_back(x);
    end
    send_word({16'(budget), 16'(k)});
    for (int s = 0; s < k; s++) begin
      for (int w = 0; w < VW; w++) begin
        for (int l = 0; l < BW / W; l++) d[l*W +: W] = W'(set[s][w * (BW / W) + l]);
        send_word(d);
      end
      send_word(BW'(norm2(set[s])));
    end
    sieve_ref(set, k, budget, W, red, issued, npass);
    sieve_cycles = 0;
    for (int s = 0; s < k; s++) begin
      int x[];
      x = new[N];
      for (int w = 0; w < VW; w++) begin
        recv_word(d);
        for (int l = 0; l < BW / W; l++) x[w * (BW / W) + l] = int'($signed(d[l*W +: W]));
      end
      recv_word(d);
      hw.push_back(x);
      hw_norm.push_back(int'(d));
    end
    recv_word(d);
    checks++;
    if (int'(d) != red || int'(reductions) != red) begin
      failures++; $display("reductions %0d/%0d expected %0d", d, reductions, red);
    end
    checks++;
    if (int'(pairs_issued) != issued) begin
      failures++; $display("pairs issued %0d expected %0d", pairs_issued, issued);
    end
    checks++;
    if (int'(passes) != npass) begin failures++; $display("passes %0d expected %0d", passes, npass); end
    for (int s = 0; s < k; s++) begin
      checks++;
      if (hw[s] != set[s] || longint'(hw_norm[s]) != norm2(hw[s])) begin
        failures++; $display("vector %0d differs", s);
      end
    end
    if (budget == 0) begin
      for (int i = 0; i < k; i++)
        for (int j = 0; j < k; j++)
          if (i != j && norm2(hw[j]) != 0 && norm2(hw[j]) <= norm2(hw[i])) begin
            longint dd = 0;
            foreach (hw[i][c]) dd += longint'(hw[i][c]) * hw[j][c];
            if (dd < 0) dd = -dd;
            checks++;
            if (2 * dd > norm2(hw[j])) begin failures++; $display("pair %0d,%0d not reduced", i, j); end
          end
    end else begin
      checks++;
      if (red < budget) begin failures++; $display("budget run did %0d reductions", red); end
    end
    // every sweep takes count + LATENCY + a few cycles, however many pairs it issues
    checks++;
    if (sieve_cycles > (npass + 1) * k * (k + 12 + 4) + 4) begin
      failures++; $display("sieving took %0d cycles", sieve_cycles);
    end
    $display("set of %0d: %0d reductions, %0d pairs issued, %0d passes, %0d cycles",
             k, red, issued, npass, sieve_cycles);
  endtask

  initial begin
    in_valid = 1'b0; in_data = '0; out_ready = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    run(12, 0, 1);
    run(16, 5, 0);
    run(16, 0, 0);
    checks++;
    if (busy) begin failures++; $display("still busy"); end
    checks++;
    if (back_to_back == 0) begin failures++; $display("engine never got back-to-back requests"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
