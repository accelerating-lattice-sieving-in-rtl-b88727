// sieve_top_run: end-to-end test body for sieve_top at its default parameters
// (N = 120, 8-bit coordinates, 32-bit bus, 256-entry set). Wrapped by
// sieve_top_tb (a small set) and sieve_top_full_tb (the whole 256-entry set).
//
// Sequence: single-reduction offload of NSINGLE pairs (with a slow receiver
// so the link stalls, and operands chosen to give clamped quotients, no
// reduction and coordinate overflow); a mode change requested while the link
// is busy (must wait until it is idle); an on-chip sieve of K_SET vectors with
// no budget and one with a budget; then back to single mode. Results are
// compared with the reference model. Each mechanism is counted and a failure
// is recorded for any that never happened, including set-mode pairs issued
// faster than one per engine latency (the pipeline overlapping them).
module sieve_top_run #(
  parameter int K_SET   = 24,
  parameter int NSINGLE = 12,
  parameter int WATCHDOG = 200_000   // clock cycles before the run is declared hung
) ();
  import sieve_pkg::*;
  import sieve_ref_pkg::*;

  localparam int unsigned N      = N_DIM;
  localparam int unsigned W      = COORD_W;
  localparam int unsigned BW     = BUS_W;
  localparam int unsigned CPW    = BW / W;
  localparam int unsigned VW     = N / CPW;
  localparam int unsigned NORM_W = dot_width(N, W);
  localparam int unsigned LAT    = reduce_latency(N);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  mode_e         mode, mode_active;
  logic          in_valid, in_ready, out_valid, out_ready;
  logic [BW-1:0] in_data, out_data;
  logic          link_stall, set_busy, set_sieving;
  logic [31:0]   set_reductions, set_pairs_issued;
  logic [15:0]   set_passes;

  sieve_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_stall = 0, n_switch = 0, n_sat = 0, n_ovf = 0, n_noreduce = 0, n_reduce = 0;
  int n_set_red = 0, n_budget_stop = 0, n_skipped = 0, n_deferred_switch = 0;
  int n_pipelined = 0;      // set runs that issued pairs faster than one per engine latency
  int sieve_cycles = 0;
  always @(posedge clk) if (set_sieving) sieve_cycles++;
  bit slow_rx = 0;
  mode_e prev_mode = MODE_SINGLE;

  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (link_stall) n_stall++;
  always @(posedge clk) if (rst_n) begin
    if (mode_active != prev_mode) n_switch++;
    prev_mode <= mode_active;
  end

  task automatic send_word(input logic [BW-1:0] d);
    in_valid = 1'b1; in_data = d;
    do @(posedge clk); while (!in_ready);
    #1 in_valid = 1'b0;
  endtask

  task automatic recv_word(output logic [BW-1:0] d);
    out_ready = 1'b1;
    if (slow_rx) while ($urandom_range(0, 3) != 0) begin
      out_ready = 1'b0; @(posedge clk); #1; out_ready = 1'b1;
    end
    do @(posedge clk); while (!out_valid);
    d = out_data;
    #1 out_ready = 1'b0;
  endtask

  task automatic send_vec(input int x[]);
    logic [BW-1:0] d;
    for (int w = 0; w < VW; w++) begin
      for (int l = 0; l < CPW; l++) d[l*W +: W] = W'(x[w * CPW + l]);
      send_word(d);
    end
  endtask

  task automatic recv_vec(output int x[]);
    logic [BW-1:0] d;
    x = new[N];
    for (int w = 0; w < VW; w++) begin
      recv_word(d);
      for (int l = 0; l < CPW; l++) x[w * CPW + l] = int'($signed(d[l*W +: W]));
    end
  endtask

  // ---- single-reduction mode: sender and receiver run in parallel ----
  reduce_res_t sq[$];
  int          t_last[$];

  task automatic single_sender(input int nops);
    int v[], u[];
    v = new[N]; u = new[N];
    for (int op = 0; op < nops; op++) begin
      int k, amp, noise;
      k     = (op % 4 == 0) ? 6 : int'($urandom_range(0, 8)) - 4;
      amp   = (op % 6 == 5) ? 60 : 4;
      noise = (op % 5 == 2) ? 60 : 3;
      for (int i = 0; i < N; i++) begin
        u[i] = int'($urandom_range(0, 2 * amp)) - amp;
        v[i] = wrap(k * u[i] + int'($urandom_range(0, 2 * noise)) - noise, W);
        if (op % 6 == 5) begin          // q = 2 pushes the last coordinates to -140
          u[i] = 60;
          v[i] = (i < N - 10) ? 127 : -20;
        end
      end
      sq.push_back(reduce_ref(v, u, W));
      send_vec(v);
      send_vec(u);
      send_word(BW'(norm2(v)));
      send_word(BW'(norm2(u)));
      t_last.push_back(cycle);
    end
  endtask

  task automatic single_receiver(input int nops, input bit timed);
    for (int op = 0; op < nops; op++) begin
      reduce_res_t e;
      int x[];
      logic [BW-1:0] st;
      int t0;
      wait (sq.size() > 0 && t_last.size() > 0);
      e = sq.pop_front();
      t0 = t_last.pop_front();
      if (timed) begin
        while (!out_valid) @(negedge clk);
        checks++;
        if (cycle - t0 != LAT + 1) begin
          failures++; $display("single op %0d: answer after %0d cycles", op, cycle - t0);
        end
      end
      recv_vec(x);
      recv_word(st);
      checks++;
      if (x != e.v) begin failures++; $display("single op %0d: coordinates differ", op); end
      checks++;
      if (st[31] != e.reduced || st[30] != e.sat || st[29] != e.ovf ||
          longint'(st[NORM_W-1:0]) != e.norm) begin
        failures++; $display("single op %0d: status %h expected norm %0d", op, st, e.norm);
      end
      n_sat += e.sat; n_ovf += e.ovf; n_noreduce += !e.reduced; n_reduce += e.reduced;
    end
  endtask

  // ---- set mode ----
  task automatic set_run(input int k, input int budget);
    int set[$][], hw[$][];
    int red, issued, npass, bases[8][];
    logic [BW-1:0] d;
    // vectors are short integer combinations of a few short base vectors, so
    // that they reduce against each other
    for (int b = 0; b < 8; b++) begin
      bases[b] = new[N];
      foreach (bases[b][i]) bases[b][i] = int'($urandom_range(0, 4)) - 2;
    end
    for (int s = 0; s < k; s++) begin
      int x[];
      x = new[N];
      foreach (x[i]) x[i] = 0;
      for (int b = 0; b < 8; b++) begin
        int c;
        c = int'($urandom_range(0, 4)) - 2;
        foreach (x[i]) x[i] += c * bases[b][i];
      end
      foreach (x[i]) x[i] = wrap(x[i], W);
      set.push_back(x);
    end
    send_word({16'(budget), 16'(k)});
    for (int s = 0; s < k; s++) begin
      send_vec(set[s]);
      send_word(BW'(norm2(set[s])));
    end
    sieve_cycles = 0;
    sieve_ref(set, k, budget, W, red, issued, npass);
    for (int s = 0; s < k; s++) begin
      int x[];
      recv_vec(x);
      recv_word(d);
      hw.push_back(x);
      checks++;
      if (x != set[s] || longint'(d) != norm2(x)) begin failures++; $display("set vector %0d differs", s); end
    end
    recv_word(d);
    checks++;
    if (int'(d) != red) begin failures++; $display("set reductions %0d expected %0d", d, red); end
    checks++;
    if (int'(set_pairs_issued) != issued || int'(set_passes) != npass) begin
      failures++; $display("pairs %0d passes %0d, expected %0d %0d", set_pairs_issued, set_passes, issued, npass);
    end
    // each sweep costs about k + LAT cycles however many pairs it issues
    checks++;
    if (sieve_cycles > (npass + 1) * k * (k + LAT + 4) + 4) begin
      failures++; $display("sieving took %0d cycles", sieve_cycles);
    end
    if (issued * (LAT + 2) > sieve_cycles) n_pipelined++;
    n_set_red += red;
    if (budget != 0 && red >= budget && int'(set_passes) == npass) n_budget_stop++;
    n_skipped += npass * k * (k - 1) - issued;
    if (budget == 0) begin
      int bad = 0;
      for (int i = 0; i < k; i++)
        for (int j = 0; j < k; j++)
          if (i != j && norm2(hw[j]) != 0 && norm2(hw[j]) <= norm2(hw[i])) begin
            longint dd = 0;
            foreach (hw[i][c]) dd += longint'(hw[i][c]) * hw[j][c];
            if (dd < 0) dd = -dd;
            if (2 * dd > norm2(hw[j])) bad++;
          end
      checks++;
      if (bad != 0) begin failures++; $display("%0d pairs not Gauss reduced", bad); end
    end
    $display("set of %0d, budget %0d: %0d reductions, %0d pairs issued, %0d passes, %0d cycles",
             k, budget, red, issued, npass, sieve_cycles);
  endtask

  initial begin
    mode = MODE_SINGLE; in_valid = 1'b0; in_data = '0; out_ready = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. single-reduction offload, receiver at full speed (latency checked)
    fork
      single_sender(NSINGLE);
      single_receiver(NSINGLE, 1'b1);
    join
    // 2. slow receiver: the link stalls; ask for set mode while it is busy
    slow_rx = 1;
    fork
      single_sender(NSINGLE);
      single_receiver(NSINGLE, 1'b0);
      begin
        repeat (100) @(posedge clk);
        #1 mode = MODE_SET;
        @(posedge clk); #1;
        checks++;
        if (mode_active != MODE_SINGLE) begin failures++; $display("mode switched while busy"); end
        else n_deferred_switch++;
      end
    join
    slow_rx = 0;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (mode_active != MODE_SET) begin failures++; $display("mode did not switch to set"); end

    // 3. on-chip sieving, unlimited and with a budget
    set_run(K_SET, 0);
    set_run(K_SET, 7);

    // 4. back to single mode
    mode = MODE_SINGLE;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (mode_active != MODE_SINGLE) begin failures++; $display("mode did not switch back"); end
    fork
      single_sender(2);
      single_receiver(2, 1'b1);
    join

    $display("stall cycles %0d, mode switches %0d (1 deferred), clamped %0d, overflow %0d,",
             n_stall, n_switch, n_sat, n_ovf);
    $display("not reduced %0d, reduced %0d, set reductions %0d, budget stops %0d, skipped pairs %0d",
             n_noreduce, n_reduce, n_set_red, n_budget_stop, n_skipped);
    checks++; if (n_stall == 0)           begin failures++; $display("no stall"); end
    checks++; if (n_switch < 2)           begin failures++; $display("no mode switch"); end
    checks++; if (n_deferred_switch == 0) begin failures++; $display("no deferred switch"); end
    checks++; if (n_sat == 0)             begin failures++; $display("no clamped quotient"); end
    checks++; if (n_ovf == 0)             begin failures++; $display("no overflow"); end
    checks++; if (n_noreduce == 0)        begin failures++; $display("no unreduced pair"); end
    checks++; if (n_reduce == 0)          begin failures++; $display("no reduced pair"); end
    checks++; if (n_set_red == 0)         begin failures++; $display("no set reduction"); end
    checks++; if (n_budget_stop == 0)     begin failures++; $display("no budget stop"); end
    checks++; if (n_skipped == 0)         begin failures++; $display("no skipped pair"); end
    checks++; if (n_pipelined == 0)       begin failures++; $display("set mode never overlapped pairs in the engine"); end
    $display("%0d clock cycles", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
