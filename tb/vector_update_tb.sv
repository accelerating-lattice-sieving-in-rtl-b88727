// vector_update_tb: checks v - q*u, the incremental squared-norm update and the
// overflow flag for every q in -4..4 on random vectors, against the squared
// norm recomputed from scratch.
module vector_update_tb;
  import sieve_pkg::*;

  localparam int unsigned N      = 120;
  localparam int unsigned W      = 8;
  localparam int unsigned DOT_W  = dot_width(N, W);
  localparam int unsigned NORM_W = dot_width(N, W);

  logic signed [W-1:0]      v [N];
  logic signed [W-1:0]      u [N];
  logic signed [Q_W-1:0]    q;
  logic signed [DOT_W-1:0]  dot;
  logic        [NORM_W-1:0] norm_v, norm_u, norm_new;
  logic signed [W-1:0]      v_new [N];
  logic                     ovf;

  vector_update #(.N(N), .W(W)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int k = 0; k < 3000; k++) begin
      longint d, nv, nu, nn;
      int qq, rng;
      bit eovf, bad;
      rng = (k % 3 == 0) ? 127 : 20;     // small values keep results in range
      d = 0; nv = 0; nu = 0; nn = 0; eovf = 0; bad = 0;
      qq = int'($urandom_range(0, 8)) - 4;
      for (int i = 0; i < N; i++) begin
        v[i] = W'(int'($urandom_range(0, 2 * rng)) - rng);
        u[i] = W'(int'($urandom_range(0, 2 * rng)) - rng);
        d  += longint'(v[i]) * u[i];
        nv += longint'(v[i]) * v[i];
        nu += longint'(u[i]) * u[i];
      end
      q = Q_W'(qq); dot = DOT_W'(d); norm_v = NORM_W'(nv); norm_u = NORM_W'(nu);
      #1;
      for (int i = 0; i < N; i++) begin
        int full;
        full = int'(v[i]) - qq * int'(u[i]);
        nn += longint'(full) * full;
        if (full < -128 || full > 127) eovf = 1;
        else if (int'(v_new[i]) != full) bad = 1;
      end
      checks++;
      if (bad) begin failures++; $display("coordinate mismatch, q=%0d", qq); end
      checks++;
      if (ovf != eovf) begin failures++; $display("ovf %0b expected %0b", ovf, eovf); end
      checks++;
      if (longint'(norm_new) != (nn & ((64'd1 << NORM_W) - 1))) begin
        failures++; $display("norm %0d expected %0d (q=%0d)", norm_new, nn, qq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
