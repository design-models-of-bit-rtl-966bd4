// tb_control_unit: random impulse and sign inputs against a transition table
// of the three-state machine: a0 -impulse-> a1, a0 stays without impulse;
// a1 -> a2 if SM_RES >= 0 else a0; a2 stays while SM_RES >= 0 else a0. The
// decoded outputs must be ready in a0, step_arg in a1, step_res and y in a2.
module tb_control_unit;
  import oc_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic impulse, nonneg_next;
  oc_state_e state;
  logic ready, step_arg, step_res, y;
  int checks = 0, failures = 0;
  int visits [3] = '{0, 0, 0};
  int model;

  always #5 clk = ~clk;

  control_unit dut (.clk, .rst, .impulse, .nonneg_next, .state, .ready, .step_arg, .step_res, .y);

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    impulse = 0; nonneg_next = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    model = 0;
    for (int i = 0; i < 5000; i++) begin
      int nxt;
      check(int'(state) == model, $sformatf("cycle %0d state %0d expected %0d", i, state, model));
      check(ready == (model == 0) && step_arg == (model == 1) &&
            step_res == (model == 2) && y == (model == 2), $sformatf("cycle %0d outputs", i));
      visits[model]++;
      impulse     = $urandom_range(0, 1);
      nonneg_next = ($urandom_range(0, 3) != 0);
      case (model)
        0: nxt = impulse ? 1 : 0;
        1: nxt = nonneg_next ? 2 : 0;
        default: nxt = nonneg_next ? 2 : 0;
      endcase
      @(negedge clk);
      model = nxt;
    end
    check(visits[0] > 0 && visits[1] > 0 && visits[2] > 0, "all states visited");
    rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    check(state == A0, "reset to a0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
