// tb_dual_port_mem: self-checking testbench of the dual-port memory.
// Both ports read and write at random; a reference copy (port 2 winning a
// same-address write) predicts each asynchronous read on both ports.
module tb_dual_port_mem;
  logic       clk = 1'b0;
  logic [7:0] addr1, wdata1, rdata1, addr2, wdata2, rdata2;
  logic       we1, we2;
  logic [7:0] ref_mem [256];
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  dual_port_mem dut (
    .clk(clk), .addr1(addr1), .we1(we1), .wdata1(wdata1), .rdata1(rdata1),
    .addr2(addr2), .we2(we2), .wdata2(wdata2), .rdata2(rdata2)
  );

  initial begin
    we1 = 0; we2 = 0; addr1 = 0; addr2 = 0; wdata1 = 0; wdata2 = 0;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      addr1 = 8'(2 * i);      we1 = 1; wdata1 = 8'($urandom);
      addr2 = 8'(2 * i + 1);  we2 = 1; wdata2 = 8'($urandom);
      ref_mem[2*i] = wdata1;
      ref_mem[2*i+1] = wdata2;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      addr1 = 8'($urandom);
      addr2 = (t % 7 == 0) ? addr1 : 8'($urandom);
      we1 = ($urandom_range(0, 2) == 0);
      we2 = ($urandom_range(0, 2) == 0);
      wdata1 = 8'($urandom);
      wdata2 = 8'($urandom);
      #1;
      checks += 2;
      if (rdata1 !== ref_mem[addr1]) begin
        failures++;
        $display("FAIL port1 addr=%0d got %h expected %h", addr1, rdata1, ref_mem[addr1]);
      end
      if (rdata2 !== ref_mem[addr2]) begin
        failures++;
        $display("FAIL port2 addr=%0d got %h expected %h", addr2, rdata2, ref_mem[addr2]);
      end
      if (we1) ref_mem[addr1] = wdata1;
      if (we2) ref_mem[addr2] = wdata2;
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
