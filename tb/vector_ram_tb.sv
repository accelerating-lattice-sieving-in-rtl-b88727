// vector_ram_tb: writes random wide words to random addresses, reads them back
// on both ports with the one-cycle read latency, and checks read-during-write
// returns the old contents.
module vector_ram_tb;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned WIDTH = 96;
  localparam int unsigned AW    = 6;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             wr_en;
  logic [AW-1:0]    wr_addr, rd_a_addr, rd_b_addr;
  logic [WIDTH-1:0] wr_data, rd_a_data, rd_b_data;

  vector_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [DEPTH];

  function automatic logic [WIDTH-1:0] rnd();
    return {$urandom, $urandom, $urandom};
  endfunction

  initial begin
    wr_en = 1'b0; wr_addr = '0; wr_data = '0; rd_a_addr = '0; rd_b_addr = '0;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = AW'(a); wr_data = rnd(); model[a] = wr_data;
    end
    @(negedge clk); wr_en = 1'b0;
    // random traffic
    for (int k = 0; k < 2000; k++) begin
      logic [AW-1:0] ra, rb;
      logic [WIDTH-1:0] ea, eb;
      @(negedge clk);
      ra = AW'($urandom); rb = AW'($urandom);
      rd_a_addr = ra; rd_b_addr = rb;
      ea = model[ra]; eb = model[rb];
      wr_en = ($urandom_range(0, 1) == 1);
      wr_addr = (k % 5 == 0) ? ra : AW'($urandom);
      wr_data = rnd();
      if (wr_en) model[wr_addr] = wr_data;
      @(negedge clk);
      wr_en = 1'b0;
      checks++;
      if (rd_a_data !== ea) begin failures++; $display("port a addr %0d wrong", ra); end
      checks++;
      if (rd_b_data !== eb) begin failures++; $display("port b addr %0d wrong", rb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
