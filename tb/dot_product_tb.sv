// dot_product_tb: self-checking test of the pipelined inner product.
// Streams random vector pairs (plus extreme values) one per cycle, with gaps,
// into a 120-dimensional dot_product and compares every result with a sum
// computed here, and checks that each result appears exactly 1 + ceil(log2 N)
// cycles after its inputs.
module dot_product_tb;
  import sieve_pkg::*;

  localparam int unsigned N     = 120;
  localparam int unsigned W     = 8;
  localparam int unsigned DOT_W = dot_width(N, W);
  localparam int unsigned LAT   = 1 + $clog2(N);
  localparam int unsigned NOPS  = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                    in_valid, out_valid;
  logic signed [W-1:0]     a [N];
  logic signed [W-1:0]     b [N];
  logic signed [DOT_W-1:0] dot;

  dot_product #(.N(N), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  longint exp_q[$];
  int     t_q[$];
  int     cycle = 0;
  int     got = 0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (rst_n && out_valid) begin
    longint e; int t;
    e = exp_q.pop_front(); t = t_q.pop_front();
    checks++;
    if (longint'(dot) != e) begin
      failures++; $display("dot mismatch: got %0d expected %0d", dot, e);
    end
    checks++;
    if (cycle - t != LAT) begin
      failures++; $display("latency %0d, expected %0d", cycle - t, LAT);
    end
    got++;
  end

  initial begin
    in_valid = 1'b0;
    foreach (a[i]) begin a[i] = '0; b[i] = '0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int op = 0; op < NOPS; op++) begin
      longint s;
      s = 0;
      for (int i = 0; i < N; i++) begin
        case (op)
          0: begin a[i] = -128; b[i] = -128; end
          1: begin a[i] = -128; b[i] = 127; end
          2: begin a[i] = 127;  b[i] = 127; end
          default: begin a[i] = W'($urandom); b[i] = W'($urandom); end
        endcase
        s += longint'(a[i]) * longint'(b[i]);
      end
      in_valid = 1'b1;
      exp_q.push_back(s);
      t_q.push_back(cycle);
      @(posedge clk);
      #1;
      if (op % 7 == 6) begin in_valid = 1'b0; @(posedge clk); #1; end
    end
    in_valid = 1'b0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (got != NOPS) begin failures++; $display("only %0d of %0d results", got, NOPS); end
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
