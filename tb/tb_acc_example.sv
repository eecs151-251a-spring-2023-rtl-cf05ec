// tb_acc_example: self-checking testbench of the R0/R1/ACC example.
// Loads random R0, R1, ACC, runs the three-cycle program and checks each
// register after every cycle against the transfers
//   ACC<-ACC+R0, R1<-R0;  ACC<-ACC+R1, R0<-R1;  R0<-ACC;
// evaluated here, plus that busy lasts exactly three cycles and that the
// registers hold in IDLE.
module tb_acc_example;
  logic       clk = 1'b0;
  logic       rst, init, go, busy;
  logic [7:0] r0_in, r1_in, acc_in, r0, r1, acc;
  logic [7:0] e0, e1, ea, t0, t1, ta;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  acc_example dut (
    .clk(clk), .rst(rst), .init(init), .r0_in(r0_in), .r1_in(r1_in), .acc_in(acc_in),
    .go(go), .busy(busy), .r0(r0), .r1(r1), .acc(acc)
  );

  task automatic check(input string what);
    checks++;
    if (r0 !== e0 || r1 !== e1 || acc !== ea) begin
      failures++;
      $display("FAIL %s: r0=%h r1=%h acc=%h expected %h %h %h", what, r0, r1, acc, e0, e1, ea);
    end
  endtask

  initial begin
    rst = 1'b1; init = 1'b0; go = 1'b0;
    r0_in = 0; r1_in = 0; acc_in = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int t = 0; t < 200; t++) begin
      init = 1'b1;
      r0_in = 8'($urandom); r1_in = 8'($urandom); acc_in = 8'($urandom);
      e0 = r0_in; e1 = r1_in; ea = acc_in;
      @(posedge clk);
      #1 init = 1'b0;
      check("init");
      // Idle cycles: nothing moves.
      repeat (2) @(posedge clk);
      #1 check("idle");
      go = 1'b1;
      @(posedge clk);  // IDLE -> CYC1
      #1 go = 1'b0;
      checks++;
      if (!busy) begin failures++; $display("FAIL busy not set"); end
      @(posedge clk);  // cycle 1
      t0 = e0; t1 = e1; ta = e2sum(ea, e0);
      e1 = t0; ea = ta;
      #1 check("cycle1");
      @(posedge clk);  // cycle 2
      t0 = e1; ta = e2sum(ea, e1);
      e0 = t0; ea = ta;
      #1 check("cycle2");
      @(posedge clk);  // cycle 3
      e0 = ea;
      #1 check("cycle3");
      checks++;
      if (busy) begin failures++; $display("FAIL busy after three cycles"); end
      @(posedge clk);
      #1 check("after");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] e2sum(logic [7:0] a, logic [7:0] b);
    return a + b;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
