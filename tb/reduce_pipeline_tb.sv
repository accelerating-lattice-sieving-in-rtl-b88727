// reduce_pipeline_tb: streams Reduce(v,u) operations into the 120-dimensional
// pipeline, one per cycle with occasional gaps, and compares every result
// (coordinates, squared norm, reduced/clamp/overflow flags, tag) with the
// reference model, and checks the 12-cycle latency and one-per-cycle rate.
// Operands are built as v = k*u + noise with k from -6 to 6 so that every
// quotient from -4 to 4, the clamp and the no-reduction case all occur.
module reduce_pipeline_tb;
  import sieve_pkg::*;
  import sieve_ref_pkg::*;

  localparam int unsigned N      = 120;
  localparam int unsigned W      = 8;
  localparam int unsigned NORM_W = dot_width(N, W);
  localparam int unsigned LAT    = 12;
  localparam int unsigned NOPS   = 600;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     in_valid, out_valid, out_reduced, out_sat, out_ovf;
  logic signed [W-1:0]      in_v [N];
  logic signed [W-1:0]      in_u [N];
  logic        [NORM_W-1:0] in_norm_v, in_norm_u, out_norm;
  logic        [15:0]       in_tag, out_tag;
  logic signed [W-1:0]      out_v [N];

  reduce_pipeline #(.N(N), .W(W)) dut (.*);

  int checks = 0, failures = 0, cycle = 0, got = 0;
  int n_red = 0, n_sat = 0, n_ovf = 0, n_q[9];
  reduce_res_t exp_q[$];
  int          t_q[$];

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (rst_n && out_valid) begin
    reduce_res_t e; int t; bit bad;
    e = exp_q.pop_front(); t = t_q.pop_front();
    bad = 0;
    for (int i = 0; i < N; i++) if (int'(out_v[i]) != e.v[i]) bad = 1;
    checks++; if (bad) begin failures++; $display("op %0d: coordinates differ", got); end
    checks++;
    if (out_reduced != e.reduced || out_sat != e.sat || out_ovf != e.ovf) begin
      failures++; $display("op %0d: flags %0b%0b%0b expected %0b%0b%0b", got,
                           out_reduced, out_sat, out_ovf, e.reduced, e.sat, e.ovf);
    end
    checks++;
    if (longint'(out_norm) != e.norm) begin
      failures++; $display("op %0d: norm %0d expected %0d", got, out_norm, e.norm);
    end
    checks++;
    if (int'(out_tag) != (got & 16'hffff)) begin failures++; $display("op %0d: tag %0d", got, out_tag); end
    checks++;
    if (cycle - t != LAT) begin failures++; $display("op %0d: latency %0d", got, cycle - t); end
    n_red += e.reduced; n_sat += e.sat; n_ovf += e.ovf; n_q[e.q + 4]++;
    got++;
  end

  initial begin
    int v[], u[];
    v = new[N]; u = new[N];
    in_valid = 1'b0; in_tag = '0; in_norm_v = '0; in_norm_u = '0;
    foreach (in_v[i]) begin in_v[i] = '0; in_u[i] = '0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int op = 0; op < NOPS; op++) begin
      int k, amp, noise;
      k     = int'($urandom_range(0, 12)) - 6;
      amp   = (op % 10 == 9) ? 60 : 3;          // some operations overflow
      noise = (op % 4 == 0) ? 40 : 4;
      for (int i = 0; i < N; i++) begin
        u[i] = int'($urandom_range(0, 2 * amp)) - amp;
        v[i] = wrap(k * u[i] + int'($urandom_range(0, 2 * noise)) - noise, W);
        in_v[i] = W'(v[i]); in_u[i] = W'(u[i]);
      end
      in_norm_v = NORM_W'(norm2(v));
      in_norm_u = NORM_W'(norm2(u));
      in_tag    = 16'(op);
      in_valid  = 1'b1;
      exp_q.push_back(reduce_ref(v, u, W));
      t_q.push_back(cycle);
      @(posedge clk); #1;
      if (op % 11 == 10) begin in_valid = 1'b0; @(posedge clk); #1; end
    end
    in_valid = 1'b0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (got != NOPS) begin failures++; $display("only %0d results", got); end
    for (int i = 0; i < 9; i++) begin
      checks++;
      if (n_q[i] == 0) begin failures++; $display("quotient %0d never occurred", i - 4); end
    end
    checks++;
    if (n_sat == 0 || n_ovf == 0 || n_red == NOPS) begin
      failures++; $display("clamp/overflow/no-reduction case not exercised");
    end
    $display("reduced %0d, clamped %0d, overflow %0d of %0d", n_red, n_sat, n_ovf, NOPS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
