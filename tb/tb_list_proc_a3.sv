// tb_list_proc_a3: self-checking testbench of list_proc_a3.
//
// Builds random linked lists in a 256-byte memory model (asynchronous read,
// nodes at random, possibly odd, addresses; the head at address 0; the last
// pointer 0), runs the processor and compares r with the sum computed here
// by walking the list, modulo 2**8. Checks that done rises exactly
// 2 * n + 1 clock edges after the first edge with start low (2 cycles per node),
// that done and r then hold, and that raising start in the middle of a run
// restarts it cleanly. A watchdog ends the run if it hangs.
module tb_list_proc_a3;
  import lp_pkg::*;

  logic        clk = 1'b0;
  logic        start;
  addr_t       mem_addr;
  word_t       mem_rdata;
  logic        done;
  logic [7:0]  r;

  logic [7:0]  mem [256];
  int checks = 0;
  int failures = 0;
  int exp_sum;
  int n_nodes;

  always #5 clk = ~clk;
  assign mem_rdata = mem[mem_addr];

  list_proc_a3 dut (
    .clk(clk), .start(start), .mem_addr(mem_addr), .mem_rdata(mem_rdata),
    .done(done), .r(r)
  );

  // Random list of n nodes; fills exp_sum.
  task automatic build_list(input int n, input bit big_values);
    bit used [256];
    int addr [];
    int a;
    addr = new[n];
    foreach (mem[i]) begin
      mem[i] = 8'($urandom);
      used[i] = 1'b0;
    end
    addr[0] = 0;
    used[0] = 1'b1;
    used[1] = 1'b1;
    for (int k = 1; k < n; k++) begin
      do a = 2 + int'($urandom_range(0, 252)); while (used[a] || used[a+1]);
      used[a] = 1'b1;
      used[a+1] = 1'b1;
      addr[k] = a;
    end
    exp_sum = 0;
    for (int k = 0; k < n; k++) begin
      logic [7:0] v;
      v = big_values ? 8'(8'd100 + 8'($urandom_range(0, 27))) : 8'($urandom);
      mem[addr[k]]   = (k == n - 1) ? 8'd0 : 8'(addr[k+1]);
      mem[addr[k]+1] = v;
      exp_sum += int'($signed(v));
    end
  endtask

  task automatic run_list(input int n, input string what);
    int cycles;
    int lat;
    logic [7:0] r_done;
    lat = 2 * n + 1;
    start = 1'b1;
    repeat (2) @(posedge clk);
    #1 start = 1'b0;
    cycles = 0;
    do begin
      @(posedge clk);
      #1 cycles++;
    end while (!done && cycles < 1000);
    checks++;
    if (r !== 8'(exp_sum)) begin
      failures++;
      $display("FAIL %s: n=%0d r=%0d expected %0d", what, n, $signed(r), $signed(8'(exp_sum)));
    end
    checks++;
    if (cycles != lat) begin
      failures++;
      $display("FAIL %s: n=%0d done after %0d edges, expected %0d", what, n, cycles, lat);
    end
    r_done = r;
    repeat (3) @(posedge clk);
    #1 checks++;
    if (!done || r !== r_done) begin
      failures++;
      $display("FAIL %s: done/r did not hold", what);
    end
  endtask

  initial begin
    start = 1'b1;
    // Fixed small lists first.
    for (int n = 1; n <= 4; n++) begin
      n_nodes = n;
      build_list(n, 1'b0);
      run_list(n, "small");
    end
    // Sum that overflows 8 bits.
    n_nodes = 20;
    build_list(n_nodes, 1'b1);
    run_list(n_nodes, "overflow");
    // Interrupt a run with START, then run a new list from scratch.
    build_list(30, 1'b0);
    start = 1'b1;
    repeat (2) @(posedge clk);
    #1 start = 1'b0;
    repeat (17) @(posedge clk);
    n_nodes = 9;
    build_list(n_nodes, 1'b0);
    run_list(n_nodes, "restart");
    // Random lists.
    for (int t = 0; t < 40; t++) begin
      n_nodes = 1 + int'($urandom_range(0, 84));
      build_list(n_nodes, 1'b0);
      run_list(n_nodes, "random");
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
