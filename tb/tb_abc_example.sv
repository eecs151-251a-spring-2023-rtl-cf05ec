// tb_abc_example: self-checking testbench of the regA/regB/regC example.
// Drives a new random IN every cycle and checks, after each edge, the
// registers against the program regA<-IN; regB<-IN; regC<-regA+regB;
// regB<-regC evaluated here, with the phase output stepping 0,1,2,3.
module tb_abc_example;
  logic       clk = 1'b0;
  logic       rst;
  logic [7:0] in, a, b, c;
  logic [1:0] phase;
  logic [7:0] ea, eb, ec, na, nb;
  int exp_phase;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  abc_example dut (.clk(clk), .rst(rst), .in(in), .reg_a(a), .reg_b(b), .reg_c(c), .phase(phase));

  initial begin
    rst = 1'b1;
    in = 8'h00;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    exp_phase = 0;
    // Registers are unknown until the program has run once.
    for (int t = 0; t < 4000; t++) begin
      checks++;
      if (int'(phase) != exp_phase) begin
        failures++;
        $display("FAIL t=%0d phase=%0d expected %0d", t, phase, exp_phase);
      end
      in = 8'($urandom);
      // Predict the registers after this edge.
      na = a; nb = b;
      case (exp_phase)
        0: na = in;
        1: nb = in;
        3: nb = c;
        default: ;
      endcase
      ec = a + b;
      ea = na; eb = nb;
      @(posedge clk);
      #1;
      checks++;
      if (a !== ea || b !== eb || c !== ec) begin
        failures++;
        $display("FAIL t=%0d a=%h b=%h c=%h expected %h %h %h", t, a, b, c, ea, eb, ec);
      end
      exp_phase = (exp_phase + 1) % 4;
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
