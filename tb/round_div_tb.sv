// round_div_tb: exhaustive-style test of the comparison-based rounded divider.
// For random and boundary (dot, ||u||^2) pairs it compares q, the reduce flag
// and the clamp flag with round-half-away-from-zero of dot/||u||^2 worked out
// here with integer arithmetic.
module round_div_tb;
  import sieve_pkg::*;

  localparam int unsigned DOT_W  = dot_width(N_DIM, COORD_W);
  localparam int unsigned NORM_W = dot_width(N_DIM, COORD_W);

  logic signed [DOT_W-1:0]  dot;
  logic        [NORM_W-1:0] norm_u;
  logic                     reduce, sat;
  logic signed [Q_W-1:0]    q;

  round_div dut (.*);

  int checks = 0, failures = 0;

  task automatic check(longint d, longint nu);
    longint ad, m, eq; bit er, es;
    dot = DOT_W'(d); norm_u = NORM_W'(nu);
    #1;
    ad = (d < 0) ? -d : d;
    er = (nu != 0) && (2 * ad > nu);
    if (!er) m = 0;
    else begin
      m = (2 * ad + nu) / (2 * nu);   // round half up of |d|/nu
      if (m == 0) m = 1;               // 2|d| > nu guarantees at least 1
    end
    es = er && (m > 4);
    if (m > 4) m = 4;
    eq = (d < 0) ? -m : m;
    checks++;
    if (reduce !== er || longint'(q) != eq || sat !== es) begin
      failures++;
      $display("dot=%0d nu=%0d: got reduce=%0b q=%0d sat=%0b, expected %0b %0d %0b",
               d, nu, reduce, q, sat, er, eq, es);
    end
  endtask

  initial begin
    // table boundaries
    for (longint nu = 1; nu < 40; nu++)
      for (longint d = -6 * nu; d <= 6 * nu; d++) check(d, nu);
    check(0, 0); check(100, 0); check(-5, 0);
    // random, wide range
    for (int k = 0; k < 20000; k++) begin
      longint nu, d;
      nu = longint'($urandom_range(1, 1 << 20));
      d  = longint'($urandom_range(0, 6 * 1024)) * nu / 1024;
      if ($urandom_range(0, 1)) d = -d;
      check(d, nu);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
