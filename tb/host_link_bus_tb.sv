// host_link_bus_tb: the host_link test (see host_link_tb) with a 128-bit host
// bus: 16 coordinates per word, so a 120-dimensional reduction moves 8 + 8 + 2
// request words and 8 + 1 answer words instead of 62 and 31. It shows that the
// offload works at other bus widths, which set the transfer cost per reduction.
// The first answer word must still come 13 cycles after the last request word.
module host_link_bus_tb;
  import sieve_pkg::*;
  import sieve_ref_pkg::*;

  localparam int unsigned N      = 120;
  localparam int unsigned W      = 8;
  localparam int unsigned BW     = 128;
  localparam int unsigned NORM_W = dot_width(N, W);
  localparam int unsigned VW     = (N + BW / W - 1) / (BW / W);
  localparam int unsigned NOPS   = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     in_valid, in_ready, out_valid, out_ready, stall, idle;
  logic [BW-1:0]            in_data, out_data;
  logic                     req_valid, rsp_valid, rsp_reduced, rsp_sat, rsp_ovf;
  logic signed [W-1:0]      req_v [N];
  logic signed [W-1:0]      req_u [N];
  logic signed [W-1:0]      rsp_v [N];
  logic        [NORM_W-1:0] req_norm_v, req_norm_u, rsp_norm;
  logic        [15:0]       tag_out;

  host_link #(.N(N), .W(W), .BW(BW)) dut (.*);

  reduce_pipeline #(.N(N), .W(W), .TAG_W(16)) u_eng (
    .clk, .rst_n,
    .in_valid(req_valid), .in_v(req_v), .in_u(req_u),
    .in_norm_v(req_norm_v), .in_norm_u(req_norm_u), .in_tag(16'd0),
    .out_valid(rsp_valid), .out_v(rsp_v), .out_norm(rsp_norm),
    .out_reduced(rsp_reduced), .out_sat(rsp_sat), .out_ovf(rsp_ovf), .out_tag(tag_out));

  int checks = 0, failures = 0, cycle = 0, stalls = 0, n_sat = 0, n_ovf = 0;
  bit slow_rx = 0;
  reduce_res_t exp_q[$];
  int last_in_cycle[$];

  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (stall) stalls++;

  task automatic send_word(input logic [BW-1:0] d);
    in_valid = 1'b1; in_data = d;
    do @(posedge clk); while (!in_ready);
    #1 in_valid = 1'b0;
  endtask

  initial begin
    int v[], u[];
    v = new[N]; u = new[N];
    in_valid = 1'b0; in_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int op = 0; op < NOPS; op++) begin
      int k;
      k = (op % 5 == 1) ? 6 : int'($urandom_range(0, 8)) - 4;   // 6: clamped quotient
      for (int i = 0; i < N; i++) begin
        u[i] = int'($urandom_range(0, 10)) - 5;
        v[i] = k * u[i] + int'($urandom_range(0, 12)) - 6;
        if (op % 7 == 3) begin          // q = 2 pushes the last coordinates to -140
          u[i] = 60;
          v[i] = (i < N - 10) ? 127 : -20;
        end
      end
      exp_q.push_back(reduce_ref(v, u, W));
      if (op == NOPS / 2) slow_rx = 1;
      for (int w = 0; w < VW; w++) begin
        logic [BW-1:0] d;
        d = '0;
        for (int l = 0; l < BW / W; l++) if (w * (BW / W) + l < N) d[l*W +: W] = W'(v[w * (BW / W) + l]);
        send_word(d);
      end
      for (int w = 0; w < VW; w++) begin
        logic [BW-1:0] d;
        d = '0;
        for (int l = 0; l < BW / W; l++) if (w * (BW / W) + l < N) d[l*W +: W] = W'(u[w * (BW / W) + l]);
        send_word(d);
      end
      send_word(BW'(norm2(v)));
      send_word(BW'(norm2(u)));
      last_in_cycle.push_back(cycle);
    end
  end

  // receiver
  initial begin
    int got = 0;
    out_ready = 1'b1;
    wait (rst_n);
    while (got < NOPS) begin
      reduce_res_t e;
      int w, t0;
      bit bad, first;
      logic [BW-1:0] st;
      e = exp_q[0];
      w = 0; bad = 0; first = 1;
      while (w <= VW) begin
        @(negedge clk);
        out_ready = slow_rx ? ($urandom_range(0, 3) == 0) : 1'b1;
        if (first && out_valid) begin
          t0 = last_in_cycle.pop_front();
          checks++;
          // exact when the engine and answer buffer are free at once (always on
          // a 32-bit bus, whose 62 request words outlast the previous answer);
          // otherwise the pair may wait, but never less than 13 cycles
          if (((got == 0 || (BW == 32 && got < NOPS / 2)) && cycle - t0 != 13) || cycle - t0 < 13) begin
            failures++; $display("op %0d: first answer after %0d cycles", got, cycle - t0);
          end
          first = 0;
        end
        if (out_valid && out_ready) begin
          if (w < VW) begin
            for (int l = 0; l < BW / W; l++)
              if (w * (BW / W) + l < N && int'($signed(out_data[l*W +: W])) != e.v[w * (BW / W) + l]) bad = 1;
          end else st = out_data;
          w++;
        end
      end
      void'(exp_q.pop_front());
      checks++;
      if (bad) begin failures++; $display("op %0d: coordinates differ", got); end
      checks++;
      if (st[BW-1] != e.reduced || st[BW-2] != e.sat || st[BW-3] != e.ovf ||
          longint'(st[NORM_W-1:0]) != e.norm) begin
        failures++; $display("op %0d: status %h, expected norm %0d", got, st, e.norm);
      end
      n_sat += e.sat; n_ovf += e.ovf;
      got++;
    end
    checks++;
    if (n_sat == 0 || n_ovf == 0) begin failures++; $display("clamp or overflow never occurred"); end
    checks++;
    if (stalls == 0) begin failures++; $display("link never stalled"); end
    $display("stall cycles %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
