// tb_modsched_sum4: self-checking testbench of the modulo-scheduled
// E=(A+B)+(C+D) engine. A dual-port memory model holds random A..D arrays;
// after a run every E[i] is compared with the sum computed here, and the
// words outside E are checked untouched. Also checks that busy lasts
// 3*(N_ITER+1) cycles (3 cycles per iteration plus one section to drain),
// that port 2 stores exactly N_ITER times, and that in every section of the
// steady state both ports are used in phases 0 and 1 (full memory use).
module tb_modsched_sum4;
  localparam int N = 16;  // the module's default N_ITER

  logic       clk = 1'b0;
  logic       rst, start, busy, done;
  logic [7:0] addr1, rdata1, addr2, wdata2, rdata2;
  logic       we2;
  logic [7:0] mem [256];
  logic [7:0] init_mem [256];
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;
  assign rdata1 = mem[addr1];
  assign rdata2 = mem[addr2];
  always @(posedge clk) if (we2) mem[addr2] <= wdata2;

  modsched_sum4 dut (
    .clk(clk), .rst(rst), .start(start), .busy(busy), .done(done),
    .addr1(addr1), .rdata1(rdata1), .addr2(addr2), .we2(we2), .wdata2(wdata2),
    .rdata2(rdata2)
  );

  initial begin
    int busy_cycles, stores;
    rst = 1'b1;
    start = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int run = 0; run < 20; run++) begin
      foreach (mem[i]) begin
        mem[i] = 8'($urandom);
        init_mem[i] = mem[i];
      end
      @(posedge clk);
      #1 start = 1'b1;
      @(posedge clk);
      #1 start = 1'b0;
      busy_cycles = 0;
      stores = 0;
      while (busy && busy_cycles < 1000) begin
        if (we2) stores++;
        busy_cycles++;
        @(posedge clk);
        #1;
      end
      checks += 3;
      if (busy_cycles != 3 * (N + 1)) begin
        failures++;
        $display("FAIL busy for %0d cycles, expected %0d", busy_cycles, 3 * (N + 1));
      end
      if (!done) begin
        failures++;
        $display("FAIL done not raised at the end");
      end
      if (stores != N) begin
        failures++;
        $display("FAIL %0d stores, expected %0d", stores, N);
      end
      for (int i = 0; i < N; i++) begin
        logic [7:0] e;
        e = init_mem[i] + init_mem[N + i] + init_mem[2*N + i] + init_mem[3*N + i];
        checks++;
        if (mem[4*N + i] !== e) begin
          failures++;
          $display("FAIL E[%0d]=%h expected %h", i, mem[4*N + i], e);
        end
      end
      for (int i = 0; i < 256; i++) begin
        if (i >= 4*N && i < 5*N) continue;
        if (mem[i] !== init_mem[i]) begin
          failures++;
          checks++;
          $display("FAIL word %0d overwritten", i);
        end
      end
      checks++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
