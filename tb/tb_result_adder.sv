// tb_result_adder: drives SM_RES with random add, subtract and idle clocks and
// random increments, and compares value, sign and next-value sign with a
// software accumulator. Start value after reset must be -1.
module tb_result_adder;
  localparam int unsigned WIDTH = 32;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic add, sub;
  logic signed [WIDTH-1:0] incr_arg, incr_res, sm_res;
  logic nonneg, nonneg_next;
  int checks = 0, failures = 0;
  longint model;

  always #5 clk = ~clk;

  result_adder #(.WIDTH(WIDTH), .M(3), .N(2)) dut (
    .clk, .rst, .add, .sub, .incr_arg, .incr_res, .sm_res, .nonneg, .nonneg_next
  );

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
    add = 0; sub = 0; incr_arg = 0; incr_res = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    model = -1;
    check(sm_res == -1, "start value -1");
    for (int i = 0; i < 5000; i++) begin
      int op;
      longint nxt;
      op = $urandom_range(0, 2);
      add = (op == 1);
      sub = (op == 2);
      incr_arg = $signed($urandom_range(0, 20000));
      incr_res = $signed($urandom_range(0, 20000));
      nxt = model + (add ? longint'(incr_arg) : 0) - (sub ? longint'(incr_res) : 0);
      #1;
      check(nonneg_next == (nxt >= 0), $sformatf("step %0d nonneg_next", i));
      @(negedge clk);
      model = nxt;
      check(longint'(sm_res) == model, $sformatf("step %0d sm_res %0d expected %0d", i, sm_res, model));
      check(nonneg == (model >= 0), $sformatf("step %0d nonneg", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
