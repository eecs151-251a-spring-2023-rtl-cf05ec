// tb_lp_ctrl: self-checking testbench of the one-hot list-processor
// controller. Drives random start and next_zero values and compares the
// state and every control output with a reference table of the state
// diagram (START -> COMPUTE_SUM -> GET_NEXT -> COMPUTE_SUM or DONE; START=1
// goes to START from anywhere). Counts visits to every state and every
// transition out of GET_NEXT so that each edge of the diagram is exercised.
module tb_lp_ctrl;
  import lp_pkg::*;

  logic clk = 1'b0;
  logic start, next_zero;
  lp_ctrl_t ctrl;
  logic [NUM_STATES-1:0] state;

  int checks = 0;
  int failures = 0;
  int model;           // 0 START, 1 COMPUTE_SUM, 2 GET_NEXT, 3 DONE
  int visits [4];
  int gn_to_cs = 0, gn_to_done = 0;
  lp_ctrl_t exp_c;

  always #5 clk = ~clk;

  lp_ctrl dut (.clk(clk), .start(start), .next_zero(next_zero), .ctrl(ctrl), .state(state));

  function automatic lp_ctrl_t expected(int s);
    lp_ctrl_t c;
    c = '0;
    case (s)
      0: begin c.ld_sum = 1; c.sum_sel = 0; c.ld_next = 1; c.next_sel = 0; end
      1: begin c.a_sel = 1; c.add_sel = 1; c.ld_sum = 1; c.sum_sel = 1; end
      2: begin c.a_sel = 0; c.ld_next = 1; c.next_sel = 1; end
      default: c.done = 1;
    endcase
    return c;
  endfunction

  function automatic int next_model(int s, logic st, logic nz);
    if (st) return 0;
    case (s)
      0: return 1;
      1: return 2;
      2: return nz ? 3 : 1;
      default: return 3;
    endcase
  endfunction

  initial begin
    start = 1'b1;
    next_zero = 1'b0;
    @(posedge clk);
    #1 model = 0;
    for (int t = 0; t < 3000; t++) begin
      checks++;
      if (state !== NUM_STATES'(1 << model)) begin
        failures++;
        $display("FAIL t=%0d state=%b expected one-hot %0d", t, state, model);
      end
      exp_c = expected(model);
      checks++;
      // sum_sel/next_sel are don't-care where the register is not loaded;
      // compare them only where they matter.
      if (ctrl.ld_sum !== exp_c.ld_sum || ctrl.ld_next !== exp_c.ld_next ||
          ctrl.done !== exp_c.done || (exp_c.ld_sum && ctrl.sum_sel !== exp_c.sum_sel) ||
          (exp_c.ld_next && ctrl.next_sel !== exp_c.next_sel) ||
          ((model == 1 || model == 2) && (ctrl.a_sel !== exp_c.a_sel)) ||
          (model == 1 && ctrl.add_sel !== 1'b1)) begin
        failures++;
        $display("FAIL t=%0d state %0d ctrl=%b expected %b", t, model, ctrl, exp_c);
      end
      visits[model]++;
      start = ($urandom_range(0, 19) == 0);
      next_zero = ($urandom_range(0, 3) == 0);
      #1;
      if (model == 2 && !start) begin
        if (next_zero) gn_to_done++;
        else gn_to_cs++;
      end
      model = next_model(model, start, next_zero);
      @(posedge clk);
      #1;
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (visits[s] == 0) begin
        failures++;
        $display("FAIL state %0d never visited", s);
      end
    end
    checks++;
    if (gn_to_cs == 0 || gn_to_done == 0) begin
      failures++;
      $display("FAIL a GET_NEXT transition never taken");
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
