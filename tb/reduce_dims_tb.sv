// reduce_dims_tb: the reduce engine at the two lattice dimensions its
// performance is quoted for, 70 and 120. Both pipelines receive one operation
// per clock for NOPS cycles without gaps; every result is compared with the
// reference model, each must appear 12 cycles after its operands (7 adder
// levels in both cases), and each engine must return NOPS results in NOPS
// consecutive cycles (one Reduce per clock).
module reduce_dims_tb;
  import sieve_pkg::*;
  import sieve_ref_pkg::*;

  localparam int unsigned W      = 8;
  localparam int unsigned NOPS   = 400;
  localparam int unsigned LAT    = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic in_valid;

  // ---- dimension 70 ----
  localparam int unsigned NA = 70;
  localparam int unsigned NWA = dot_width(NA, W);
  logic signed [W-1:0]   a_v [NA];
  logic signed [W-1:0]   a_u [NA];
  logic signed [W-1:0]   a_ov [NA];
  logic [NWA-1:0]        a_nv, a_nu, a_on;
  logic                  a_ovalid, a_ored, a_osat, a_oovf;
  logic [15:0]           a_otag;
  reduce_pipeline #(.N(NA), .W(W)) u70 (
    .clk, .rst_n, .in_valid, .in_v(a_v), .in_u(a_u), .in_norm_v(a_nv), .in_norm_u(a_nu),
    .in_tag(16'(cycle)), .out_valid(a_ovalid), .out_v(a_ov), .out_norm(a_on),
    .out_reduced(a_ored), .out_sat(a_osat), .out_ovf(a_oovf), .out_tag(a_otag));

  // ---- dimension 120 ----
  localparam int unsigned NB = 120;
  localparam int unsigned NWB = dot_width(NB, W);
  logic signed [W-1:0]   b_v [NB];
  logic signed [W-1:0]   b_u [NB];
  logic signed [W-1:0]   b_ov [NB];
  logic [NWB-1:0]        b_nv, b_nu, b_on;
  logic                  b_ovalid, b_ored, b_osat, b_oovf;
  logic [15:0]           b_otag;
  reduce_pipeline #(.N(NB), .W(W)) u120 (
    .clk, .rst_n, .in_valid, .in_v(b_v), .in_u(b_u), .in_norm_v(b_nv), .in_norm_u(b_nu),
    .in_tag(16'(cycle)), .out_valid(b_ovalid), .out_v(b_ov), .out_norm(b_on),
    .out_reduced(b_ored), .out_sat(b_osat), .out_ovf(b_oovf), .out_tag(b_otag));

  reduce_res_t qa[$], qb[$];
  int first_a = -1, last_a = -1, got_a = 0, first_b = -1, last_b = -1, got_b = 0;

  always @(negedge clk) if (rst_n) begin
    if (a_ovalid) begin
      reduce_res_t e; bit bad;
      e = qa.pop_front(); bad = 0;
      for (int i = 0; i < NA; i++) if (int'(a_ov[i]) != e.v[i]) bad = 1;
      checks++;
      if (bad || a_ored != e.reduced || longint'(a_on) != e.norm) begin
        failures++; $display("n=70 op %0d wrong", got_a);
      end
      checks++;
      if (cycle - int'(a_otag) != LAT) begin failures++; $display("n=70 latency %0d", cycle - int'(a_otag)); end
      if (first_a < 0) first_a = cycle;
      last_a = cycle; got_a++;
    end
    if (b_ovalid) begin
      reduce_res_t e; bit bad;
      e = qb.pop_front(); bad = 0;
      for (int i = 0; i < NB; i++) if (int'(b_ov[i]) != e.v[i]) bad = 1;
      checks++;
      if (bad || b_ored != e.reduced || longint'(b_on) != e.norm) begin
        failures++; $display("n=120 op %0d wrong", got_b);
      end
      checks++;
      if (cycle - int'(b_otag) != LAT) begin failures++; $display("n=120 latency %0d", cycle - int'(b_otag)); end
      if (first_b < 0) first_b = cycle;
      last_b = cycle; got_b++;
    end
  end

  initial begin
    int va[], ua[], vb[], ub[];
    va = new[NA]; ua = new[NA]; vb = new[NB]; ub = new[NB];
    in_valid = 1'b0;
    foreach (a_v[i]) begin a_v[i] = '0; a_u[i] = '0; end
    foreach (b_v[i]) begin b_v[i] = '0; b_u[i] = '0; end
    a_nv = '0; a_nu = '0; b_nv = '0; b_nu = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int op = 0; op < NOPS; op++) begin
      int k;
      k = int'($urandom_range(0, 8)) - 4;
      for (int i = 0; i < NA; i++) begin
        ua[i] = int'($urandom_range(0, 8)) - 4;
        va[i] = k * ua[i] + int'($urandom_range(0, 6)) - 3;
        a_v[i] = W'(va[i]); a_u[i] = W'(ua[i]);
      end
      for (int i = 0; i < NB; i++) begin
        ub[i] = int'($urandom_range(0, 8)) - 4;
        vb[i] = k * ub[i] + int'($urandom_range(0, 6)) - 3;
        b_v[i] = W'(vb[i]); b_u[i] = W'(ub[i]);
      end
      a_nv = NWA'(norm2(va)); a_nu = NWA'(norm2(ua));
      b_nv = NWB'(norm2(vb)); b_nu = NWB'(norm2(ub));
      qa.push_back(reduce_ref(va, ua, W));
      qb.push_back(reduce_ref(vb, ub, W));
      in_valid = 1'b1;
      @(posedge clk); #1;
    end
    in_valid = 1'b0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (got_a != NOPS || last_a - first_a != NOPS - 1) begin
      failures++; $display("n=70: %0d results over %0d cycles", got_a, last_a - first_a + 1);
    end
    checks++;
    if (got_b != NOPS || last_b - first_b != NOPS - 1) begin
      failures++; $display("n=120: %0d results over %0d cycles", got_b, last_b - first_b + 1);
    end
    $display("n=70 and n=120: %0d Reduce operations each in %0d cycles", NOPS, last_b - first_b + 1);
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
