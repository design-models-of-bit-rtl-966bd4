// tb_bitstream_converter: power 3/2 converter driven by a pulse stream on x.
//
// Pulses are two clocks wide. Part one waits for the converter to be idle
// before each pulse and checks the latency from the rising edge of x to the
// first output bit (SYNC_STAGES + 3 clocks), the output counter against
// [x^(3/2) + 0.5], the input counter against the pulses sent, and that the
// gated output y_out is high in the high phase of each clock with an output
// bit. Part two sends the next
// pulse while an output series is still running, so the held request is
// used, and checks nothing is lost. Finally the counter preset is checked.
module tb_bitstream_converter;
  import oc_pkg::*;

  localparam int unsigned WIDTH = 32, CW = 16, SYNC = 2;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic x = 1'b0, cnt_load = 1'b0;
  logic [CW-1:0] y_count_data = '0, x_count_data = '0, y_count, x_count;
  logic y, y_out, ready, impulse;
  oc_state_e state;
  logic signed [WIDTH-1:0] sm_res;
  int checks = 0, failures = 0;
  int y_out_pulses = 0, y_clocks = 0, held = 0;

  always #5 clk = ~clk;

  bitstream_converter #(.WIDTH(WIDTH), .M(3), .N(2), .CNT_WIDTH(CW), .SYNC_STAGES(SYNC)) dut (
    .clk, .rst, .x, .cnt_load, .y_count_data, .x_count_data,
    .y, .y_out, .ready, .impulse, .state, .sm_res, .y_count, .x_count
  );

  // y_out is sampled in the middle of the clock's high phase: the AND with the
  // clock can leave a zero-width pulse at the edge where y falls.
  always @(posedge clk) begin
    #2;
    if (y_out) y_out_pulses++;
  end
  always @(posedge clk) if (!rst) begin
    if (y) y_clocks++;
    if (impulse && !ready) held++;
  end

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int ref_y(int xv);
    longint yy = 0;
    while ((2 * (yy + 1) - 1) * (2 * (yy + 1) - 1) <= 4 * longint'(xv) * xv * xv) yy++;
    return int'(yy);
  endfunction

  task automatic pulse();
    x = 1'b1;
    repeat (2) @(negedge clk);
    x = 1'b0;
  endtask

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    @(negedge clk);

    for (int i = 1; i <= 60; i++) begin
      lat = 0;
      x = 1'b1;
      while (!y && lat < 50) begin
        @(negedge clk);
        lat++;
        if (lat == 2) x = 1'b0;
      end
      x = 1'b0;
      check(lat == SYNC + 3, $sformatf("input %0d latency %0d clocks", i, lat));
      while (!(ready && !impulse)) @(negedge clk);
      repeat (2) @(negedge clk);
      check(int'(y_count) == ref_y(i), $sformatf("input %0d y_count %0d expected %0d", i, y_count, ref_y(i)));
      check(int'(x_count) == i, $sformatf("input %0d x_count %0d", i, x_count));
      check(y_out_pulses == y_clocks && y_clocks == int'(y_count), $sformatf("y_out pulses %0d, y clocks %0d, y_count %0d", y_out_pulses, y_clocks, y_count));
    end

    // Back-to-back pulses: each one is sent four clocks after the previous
    // was taken, while its output series (up to hundreds of bits) still runs.
    for (int i = 61; i <= 120; i++) begin
      while (!(ready && impulse) && x_count != CW'(i - 1)) @(negedge clk);
      while (int'(x_count) != i - 1) @(negedge clk);
      repeat (4) @(negedge clk);
      pulse();
    end
    while (!(ready && !impulse)) @(negedge clk);
    repeat (8) @(negedge clk);
    check(int'(x_count) == 120, $sformatf("x_count %0d after back-to-back pulses", x_count));
    check(int'(y_count) == ref_y(120), $sformatf("y_count %0d expected %0d", y_count, ref_y(120)));
    check(held > 0, "request held while busy");

    // Counter preset.
    y_count_data = 16'd1000; x_count_data = 16'd77;
    cnt_load = 1'b1;
    @(negedge clk) cnt_load = 1'b0;
    check(y_count == 16'd1000 && x_count == 16'd77, "counter preset");

    $display("held requests: %0d clocks", held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
