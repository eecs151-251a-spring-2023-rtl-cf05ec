// tb_lecture21_top: end-to-end testbench of lecture21_top at its default
// parameters.
//
// List summers: loads random linked lists through the shared load port into
// the four byte-wide list memories (and the same numbers, re-laid out on
// even addresses, into the 16-bit memory), starts all six processors
// together and checks every result against the sum computed here and every
// finishing time: 2*N+1 edges for architectures 1-3, 2*N+2 for the
// pipelined architecture 4, N+2 for the aligned-node 16-bit variant and
// 2*N+1 for the aligned-node byte-wide variant (which reads the 16-bit
// image split into bytes).
// Mechanisms counted, each of which must occur: multi-node loops,
// single-node lists, unaligned (odd-address) nodes, 8-bit overflow of the
// sum, START restarting a run in progress, and the pipelined steady state of
// architecture 4 (NEXT_SUM right after FETCH_X with three iterations in
// flight). The accumulator and regA/regB/regC programs and the
// modulo-scheduled engine (with its stores wrapped into the following
// section) are run and checked through their ports as well.
module tb_lecture21_top;
  import lp_pkg::*;

  logic        clk = 1'b0;
  logic        lp_start, lm_we, wm_we, wide_done;
  addr_t       lm_addr;
  word_t       lm_wdata;
  logic [3:0]  lp_done;
  logic [7:0]  lp_r [4];
  logic [6:0]  wm_addr;
  logic [15:0] wm_wdata;
  logic [7:0]  wide_r;
  logic        am_we, aligned_done;
  addr_t       am_addr;
  word_t       am_wdata;
  logic [7:0]  aligned_r;
  logic        acc_rst, acc_init, acc_go, acc_busy;
  logic [7:0]  acc_r0_in, acc_r1_in, acc_acc_in, acc_r0, acc_r1, acc_acc;
  logic        abc_rst;
  logic [7:0]  abc_in, abc_a, abc_b, abc_c;
  logic [1:0]  abc_phase;
  logic        ms_rst, ms_start, ms_busy, ms_done, ms_we;
  logic [7:0]  ms_addr, ms_wdata, ms_rdata;

  int checks = 0;
  int failures = 0;
  int m_loop = 0, m_single = 0, m_odd = 0, m_overflow = 0, m_restart = 0;
  int m_pipe = 0, m_acc = 0, m_abc = 0, m_ms_wrap = 0, m_ms_drain = 0;

  logic [7:0]  img [256];     // byte memory image
  logic [15:0] wimg [128];    // 16-bit memory image
  int exp_sum;

  always #5 clk = ~clk;

  lecture21_top dut (
    .clk(clk),
    .lp_start(lp_start), .lm_we(lm_we), .lm_addr(lm_addr), .lm_wdata(lm_wdata),
    .lp_done(lp_done), .lp_r(lp_r),
    .wm_we(wm_we), .wm_addr(wm_addr), .wm_wdata(wm_wdata), .wide_done(wide_done),
    .wide_r(wide_r),
    .am_we(am_we), .am_addr(am_addr), .am_wdata(am_wdata), .aligned_done(aligned_done),
    .aligned_r(aligned_r),
    .acc_rst(acc_rst), .acc_init(acc_init), .acc_r0_in(acc_r0_in), .acc_r1_in(acc_r1_in),
    .acc_acc_in(acc_acc_in), .acc_go(acc_go), .acc_busy(acc_busy), .acc_r0(acc_r0),
    .acc_r1(acc_r1), .acc_acc(acc_acc),
    .abc_rst(abc_rst), .abc_in(abc_in), .abc_a(abc_a), .abc_b(abc_b), .abc_c(abc_c),
    .abc_phase(abc_phase),
    .ms_rst(ms_rst), .ms_start(ms_start), .ms_busy(ms_busy), .ms_done(ms_done),
    .ms_addr(ms_addr), .ms_we(ms_we), .ms_wdata(ms_wdata), .ms_rdata(ms_rdata)
  );

  // Steady state of the pipelined processor.
  always @(posedge clk)
    if (dut.u_a4.u_ctrl.state == A4_NEXT_SUM && !lp_start) m_pipe++;

  // Build an n-node list in both images.
  task automatic build_list(input int n, input bit big);
    bit used [256];
    bit wused [128];
    int addr [];
    int waddr [];
    int a;
    logic [7:0] v;
    bit odd;
    addr = new[n];
    waddr = new[n];
    foreach (img[i]) begin img[i] = 8'($urandom); used[i] = 0; end
    foreach (wimg[i]) begin wimg[i] = 16'($urandom); wused[i] = 0; end
    addr[0] = 0; used[0] = 1; used[1] = 1;
    waddr[0] = 0; wused[0] = 1;
    odd = 0;
    for (int k = 1; k < n; k++) begin
      do a = 2 + int'($urandom_range(0, 252)); while (used[a] || used[a+1]);
      used[a] = 1; used[a+1] = 1; addr[k] = a;
      if (a % 2 == 1) odd = 1;
      do a = 1 + int'($urandom_range(0, 126)); while (wused[a]);
      wused[a] = 1; waddr[k] = a;
    end
    exp_sum = 0;
    for (int k = 0; k < n; k++) begin
      v = big ? 8'(8'd90 + 8'($urandom_range(0, 37))) : 8'($urandom);
      img[addr[k]] = (k == n - 1) ? 8'd0 : 8'(addr[k+1]);
      img[addr[k]+1] = v;
      wimg[waddr[k]] = {((k == n - 1) ? 8'd0 : 8'(2 * waddr[k+1])), v};
      exp_sum += int'($signed(v));
    end
    if (odd) m_odd++;
    if (exp_sum > 127 || exp_sum < -128) m_overflow++;
    if (n == 1) m_single++; else m_loop++;
  endtask

  task automatic load_images();
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      lm_we = 1; lm_addr = 8'(i); lm_wdata = img[i];
      wm_we = (i < 128); wm_addr = 7'(i); wm_wdata = wimg[i % 128];
      am_we = 1; am_addr = 8'(i); am_wdata = (i % 2 == 0) ? wimg[i/2][15:8] : wimg[i/2][7:0];
    end
    @(negedge clk);
    lm_we = 0; wm_we = 0; am_we = 0;
  endtask

  task automatic run_lists(input int n);
    int t_done [6];
    int cycles;
    int exp_t [6];
    for (int k = 0; k < 6; k++) t_done[k] = -1;
    exp_t[0] = 2*n + 1; exp_t[1] = 2*n + 1; exp_t[2] = 2*n + 1;
    exp_t[3] = 2*n + 2; exp_t[4] = n + 2; exp_t[5] = 2*n + 1;
    lp_start = 1;
    repeat (2) @(posedge clk);
    #1 lp_start = 0;
    cycles = 0;
    while (cycles < 600 && (t_done[0] < 0 || t_done[1] < 0 || t_done[2] < 0 ||
                            t_done[3] < 0 || t_done[4] < 0 || t_done[5] < 0)) begin
      @(posedge clk);
      #1 cycles++;
      for (int k = 0; k < 4; k++) if (lp_done[k] && t_done[k] < 0) t_done[k] = cycles;
      if (wide_done && t_done[4] < 0) t_done[4] = cycles;
      if (aligned_done && t_done[5] < 0) t_done[5] = cycles;
    end
    for (int k = 0; k < 6; k++) begin
      logic [7:0] rr;
      rr = (k < 4) ? lp_r[k] : (k == 4) ? wide_r : aligned_r;
      checks += 2;
      if (rr !== 8'(exp_sum)) begin
        failures++;
        $display("FAIL proc %0d n=%0d r=%0d expected %0d", k, n, $signed(rr), $signed(8'(exp_sum)));
      end
      if (t_done[k] != exp_t[k]) begin
        failures++;
        $display("FAIL proc %0d n=%0d done at %0d expected %0d", k, n, t_done[k], exp_t[k]);
      end
    end
  endtask

  task automatic run_acc();
    logic [7:0] r0, r1, ac;
    r0 = 8'($urandom); r1 = 8'($urandom); ac = 8'($urandom);
    @(negedge clk);
    acc_init = 1; acc_r0_in = r0; acc_r1_in = r1; acc_acc_in = ac;
    @(negedge clk);
    acc_init = 0; acc_go = 1;
    @(negedge clk);
    acc_go = 0;
    wait (!acc_busy);
    @(negedge clk);
    // ACC<-ACC+R0, R1<-R0; ACC<-ACC+R1, R0<-R1; R0<-ACC
    checks++;
    if (acc_acc !== 8'(ac + r0 + r0) || acc_r1 !== r0 || acc_r0 !== 8'(ac + r0 + r0)) begin
      failures++;
      $display("FAIL acc example r0=%h r1=%h acc=%h", acc_r0, acc_r1, acc_acc);
    end
    m_acc++;
  endtask

  task automatic run_abc();
    logic [7:0] x, y;
    // Wait for LOAD_A, present x; then LOAD_B with y.
    while (abc_phase != 2'd0) @(negedge clk);
    x = 8'($urandom); y = 8'($urandom);
    abc_in = x;
    @(negedge clk);
    abc_in = y;
    @(negedge clk);             // now in ADD
    @(negedge clk);             // now in WRITE_B, C = x + y
    @(negedge clk);             // back in LOAD_A, B = C
    checks++;
    if (abc_a !== x || abc_c !== 8'(x + y) || abc_b !== 8'(x + y)) begin
      failures++;
      $display("FAIL abc example a=%h b=%h c=%h", abc_a, abc_b, abc_c);
    end
    m_abc++;
  endtask

  task automatic run_ms();
    localparam int N = 16;
    logic [7:0] m [5*N];
    int busy_cycles;
    for (int i = 0; i < 4*N; i++) m[i] = 8'($urandom);
    for (int i = 0; i < 4*N; i++) begin
      @(negedge clk);
      ms_we = 1; ms_addr = 8'(i); ms_wdata = m[i];
    end
    @(negedge clk);
    ms_we = 0; ms_start = 1;
    @(negedge clk);
    ms_start = 0;
    busy_cycles = 0;
    while (ms_busy) begin
      if (dut.u_ms.we2 && dut.u_ms.phase == 2'd2 && dut.u_ms.iter != 0) m_ms_wrap++;
      if (dut.u_ms.iter == 5'(N)) m_ms_drain++;
      @(negedge clk);
      busy_cycles++;
    end
    checks++;
    if (busy_cycles != 3 * (N + 1)) begin
      failures++;
      $display("FAIL modulo engine busy %0d cycles", busy_cycles);
    end
    for (int i = 0; i < N; i++) begin
      ms_addr = 8'(4*N + i);
      #1 checks++;
      if (ms_rdata !== 8'(m[i] + m[N+i] + m[2*N+i] + m[3*N+i])) begin
        failures++;
        $display("FAIL E[%0d]=%h", i, ms_rdata);
      end
    end
  endtask

  initial begin
    lp_start = 1; lm_we = 0; wm_we = 0; am_we = 0; am_addr = 0; am_wdata = 0; lm_addr = 0; lm_wdata = 0; wm_addr = 0; wm_wdata = 0;
    acc_rst = 1; acc_init = 0; acc_go = 0; acc_r0_in = 0; acc_r1_in = 0; acc_acc_in = 0;
    abc_rst = 1; abc_in = 0;
    ms_rst = 1; ms_start = 0; ms_we = 0; ms_addr = 0; ms_wdata = 0;
    repeat (2) @(posedge clk);
    #1 acc_rst = 0; abc_rst = 0; ms_rst = 0;

    // Single node, small lists, an overflowing sum.
    build_list(1, 0);  load_images();  run_lists(1);
    build_list(5, 0);  load_images();  run_lists(5);
    build_list(12, 1); load_images();  run_lists(12);
    // START in the middle of a run, then a fresh run on a new list.
    build_list(40, 0); load_images();
    lp_start = 1;
    repeat (2) @(posedge clk);
    #1 lp_start = 0;
    repeat (23) @(posedge clk);
    #1 lp_start = 1;
    m_restart++;
    build_list(7, 0);  load_images();  run_lists(7);
    for (int t = 0; t < 6; t++) begin
      int n;
      n = 1 + int'($urandom_range(0, 80));
      build_list(n, 0); load_images(); run_lists(n);
    end

    for (int t = 0; t < 5; t++) run_acc();
    for (int t = 0; t < 5; t++) run_abc();
    for (int t = 0; t < 3; t++) run_ms();

    checks += 10;
    if (m_loop == 0)     begin failures++; $display("FAIL no multi-node list"); end
    if (m_single == 0)   begin failures++; $display("FAIL no single-node list"); end
    if (m_odd == 0)      begin failures++; $display("FAIL no unaligned node"); end
    if (m_overflow == 0) begin failures++; $display("FAIL no overflowing sum"); end
    if (m_restart == 0)  begin failures++; $display("FAIL no restart"); end
    if (m_pipe == 0)     begin failures++; $display("FAIL no pipelined steady state"); end
    if (m_acc == 0)      begin failures++; $display("FAIL accumulator program never ran"); end
    if (m_abc == 0)      begin failures++; $display("FAIL abc program never ran"); end
    if (m_ms_wrap == 0)  begin failures++; $display("FAIL no wrapped store"); end
    if (m_ms_drain == 0) begin failures++; $display("FAIL no drain section"); end
    $display("mechanisms: loop=%0d single=%0d odd=%0d overflow=%0d restart=%0d pipe=%0d acc=%0d abc=%0d ms_wrap=%0d ms_drain=%0d",
             m_loop, m_single, m_odd, m_overflow, m_restart, m_pipe, m_acc, m_abc, m_ms_wrap, m_ms_drain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
