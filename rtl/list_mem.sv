// list_mem: single-ported memory that holds the linked list.
//
// DEPTH words of WIDTH bits behind one address port. Reads are asynchronous:
// rdata follows addr combinationally, as the list processors expect (they
// load the addressed word into a register at the end of the same cycle).
// Writes are synchronous: when we is high, wdata is stored at addr on the
// rising clock edge. The lecture only gives the read side (8-bit address
// port, 8-bit data port, asynchronous read, one access per cycle); the write
// enable on the same port is this design's addition so the list can be
// loaded. Contents are not reset.
module list_mem #(
  parameter int WIDTH  = 8,
  parameter int ADDR_W = 8,
  parameter int DEPTH  = 1 << ADDR_W
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
