// tb_impulse_detector: pulses of random width and spacing on x. Every rising
// edge must raise `impulse` exactly SYNC_STAGES + 1 clocks later; the request
// must stay up until `accept` and fall the clock after it; a pulse arriving
// while the request is still pending is merged. Counts requests against edges.
module tb_impulse_detector;
  localparam int unsigned SYNC = 2;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic x = 1'b0, accept = 1'b0, impulse;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  impulse_detector #(.SYNC_STAGES(SYNC)) dut (.clk, .rst, .x, .accept, .impulse);

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (4) @(negedge clk);
    check(impulse == 1'b0, "idle after reset");
    for (int i = 0; i < 500; i++) begin
      int width, hold;
      width = $urandom_range(1, 4);
      hold  = $urandom_range(0, 5);
      // Rising edge, then x high for `width` clocks.
      x = 1'b1;
      for (int c = 1; c <= SYNC; c++) begin
        @(negedge clk);
        if (c <= width) x = (c < width);
        check(impulse == 1'b0, $sformatf("pulse %0d early request", i));
      end
      @(negedge clk);
      x = 1'b0;
      check(impulse == 1'b1, $sformatf("pulse %0d request after %0d clocks", i, SYNC + 1));
      // The request waits for accept.
      repeat (hold) begin
        @(negedge clk);
        check(impulse == 1'b1, $sformatf("pulse %0d request held", i));
      end
      accept = 1'b1;
      @(negedge clk);
      accept = 1'b0;
      check(impulse == 1'b0, $sformatf("pulse %0d request cleared", i));
      repeat ($urandom_range(SYNC + 1, 6)) @(negedge clk);
      check(impulse == 1'b0, $sformatf("pulse %0d one request per edge", i));
    end
    // Two pulses before the first is taken give one request.
    x = 1; @(negedge clk); x = 0; repeat (2) @(negedge clk);
    x = 1; @(negedge clk); x = 0; repeat (6) @(negedge clk);
    accept = 1; @(negedge clk); accept = 0;
    repeat (4) @(negedge clk);
    check(impulse == 1'b0, "merged pulses give one request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
