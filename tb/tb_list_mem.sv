// tb_list_mem: self-checking testbench of the single-ported list memory.
// Writes random words at random addresses, keeps a reference copy, and
// checks that reads are asynchronous (data valid in the same cycle as the
// address, before any clock edge) and that an unwritten cycle changes
// nothing.
module tb_list_mem;
  logic       clk = 1'b0;
  logic [7:0] addr, wdata, rdata;
  logic       we;
  logic [7:0] ref_mem [256];
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  list_mem dut (.clk(clk), .addr(addr), .we(we), .wdata(wdata), .rdata(rdata));

  initial begin
    we = 1'b0;
    addr = '0;
    wdata = '0;
    // Fill every word.
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      addr = 8'(i);
      we = 1'b1;
      wdata = 8'($urandom);
      ref_mem[i] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    // Random mix of reads and writes.
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      addr = 8'($urandom);
      we = ($urandom_range(0, 2) == 0);
      wdata = 8'($urandom);
      #1;
      checks++;
      if (rdata !== ref_mem[addr]) begin
        failures++;
        $display("FAIL read addr=%0d got %h expected %h", addr, rdata, ref_mem[addr]);
      end
      if (we) ref_mem[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
