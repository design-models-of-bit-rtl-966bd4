// tb_pulse_counter: random enable and load against a software count,
// including wrap-around at 2^WIDTH and reset to zero.
module tb_pulse_counter;
  localparam int unsigned W = 6;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic clken, load;
  logic [W-1:0] data, q;
  int checks = 0, failures = 0;
  int model;
  bit wrapped = 0;

  always #5 clk = ~clk;

  pulse_counter #(.WIDTH(W)) dut (.clk, .rst, .clken, .load, .data, .q);

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
    clken = 0; load = 0; data = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    model = 0;
    check(q == 0, "zero after reset");
    for (int i = 0; i < 3000; i++) begin
      clken = ($urandom_range(0, 3) != 0);
      load  = ($urandom_range(0, 99) == 0);
      data  = W'($urandom);
      @(negedge clk);
      if (load) model = int'(data);
      else if (clken) begin
        if (model == (1 << W) - 1) wrapped = 1;
        model = (model + 1) % (1 << W);
      end
      check(int'(q) == model, $sformatf("cycle %0d q=%0d expected %0d", i, q, model));
    end
    check(wrapped, "wrap-around exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
