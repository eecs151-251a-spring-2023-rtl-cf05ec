// dual_port_mem: two-port memory used by the modulo-scheduled adder example.
//
// DEPTH words of WIDTH bits with two independent ports. Each port reads
// asynchronously (rdata follows addr) and writes synchronously when its we
// is high at the rising edge. If both ports write the same word in the same
// cycle, port 2 wins. The lecture only says that A, B, C, D and E sit in a
// dual-port memory; widths, depth and the read/write behaviour are this
// design's choices, matched to the single-ported list memory.
module dual_port_mem #(
  parameter int WIDTH  = 8,
  parameter int ADDR_W = 8,
  parameter int DEPTH  = 1 << ADDR_W
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr1,
  input  logic              we1,
  input  logic [WIDTH-1:0]  wdata1,
  output logic [WIDTH-1:0]  rdata1,
  input  logic [ADDR_W-1:0] addr2,
  input  logic              we2,
  input  logic [WIDTH-1:0]  wdata2,
  output logic [WIDTH-1:0]  rdata2
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we1) mem[addr1] <= wdata1;
    if (we2) mem[addr2] <= wdata2;
  end

  assign rdata1 = mem[addr1];
  assign rdata2 = mem[addr2];

endmodule
