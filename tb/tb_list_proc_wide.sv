// tb_list_proc_wide: self-checking testbench of the aligned-node list
// processor. Builds random lists of nodes at even byte addresses in a
// 128 x 16-bit memory model (word p/2 = {pointer, number}), runs the
// processor and checks r against the sum computed here, that done rises
// N+2 edges after the first edge with start low (one cycle per node), and
// that done and r hold afterwards.
module tb_list_proc_wide;
  logic        clk = 1'b0;
  logic        start;
  logic [6:0]  mem_addr;
  logic [15:0] mem_rdata;
  logic        done;
  logic [7:0]  r;

  logic [15:0] mem [128];
  int checks = 0;
  int failures = 0;
  int exp_sum;

  always #5 clk = ~clk;
  assign mem_rdata = mem[mem_addr];

  list_proc_wide dut (
    .clk(clk), .start(start), .mem_addr(mem_addr), .mem_rdata(mem_rdata),
    .done(done), .r(r)
  );

  task automatic build_list(input int n);
    bit used [128];
    int w [];
    int a;
    w = new[n];
    foreach (mem[i]) begin
      mem[i] = 16'($urandom);
      used[i] = 1'b0;
    end
    w[0] = 0;
    used[0] = 1'b1;
    for (int k = 1; k < n; k++) begin
      do a = 1 + int'($urandom_range(0, 126)); while (used[a]);
      used[a] = 1'b1;
      w[k] = a;
    end
    exp_sum = 0;
    for (int k = 0; k < n; k++) begin
      logic [7:0] v, p;
      v = 8'($urandom);
      p = (k == n - 1) ? 8'd0 : 8'(2 * w[k+1]);
      mem[w[k]] = {p, v};
      exp_sum += int'($signed(v));
    end
  endtask

  task automatic run_list(input int n);
    int cycles;
    logic [7:0] r_done;
    start = 1'b1;
    repeat (2) @(posedge clk);
    #1 start = 1'b0;
    cycles = 0;
    do begin
      @(posedge clk);
      #1 cycles++;
    end while (!done && cycles < 1000);
    checks += 2;
    if (r !== 8'(exp_sum)) begin
      failures++;
      $display("FAIL n=%0d r=%0d expected %0d", n, $signed(r), $signed(8'(exp_sum)));
    end
    if (cycles != n + 2) begin
      failures++;
      $display("FAIL n=%0d done after %0d edges, expected %0d", n, cycles, n + 2);
    end
    r_done = r;
    repeat (3) @(posedge clk);
    #1 checks++;
    if (!done || r !== r_done) begin
      failures++;
      $display("FAIL done/r did not hold");
    end
  endtask

  initial begin
    start = 1'b1;
    for (int n = 1; n <= 4; n++) begin
      build_list(n);
      run_list(n);
    end
    for (int t = 0; t < 40; t++) begin
      int n;
      n = 1 + int'($urandom_range(0, 99));
      build_list(n);
      run_list(n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
