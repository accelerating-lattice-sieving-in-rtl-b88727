// vector_ram: on-chip store for the set of lattice vectors being sieved.
//
// DEPTH entries of WIDTH bits (one whole vector per entry, all coordinates side
// by side), one write port and two independent read ports, so that the target
// vector and the reducing vector of a pair are read in the same cycle. Reads
// are synchronous: the data of the address presented at a clock edge is on
// rd_*_data after that edge (1 cycle). A read of the address being written in
// the same cycle returns the old contents. No reset; contents are undefined
// until written.
//
// Keeping the vector set inside the FPGA, so that many reductions are done per
// transfer, follows the design description; the organisation (one vector per
// word, two read ports) is this design's choice. It maps onto block RAM as two
// copies of a simple dual-port memory.
module vector_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 960,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic [AW-1:0]    rd_a_addr,
  output logic [WIDTH-1:0] rd_a_data,
  input  logic [AW-1:0]    rd_b_addr,
  output logic [WIDTH-1:0] rd_b_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_a_data <= mem[rd_a_addr];
    rd_b_data <= mem[rd_b_addr];
  end

endmodule
