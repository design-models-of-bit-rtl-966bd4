// tb_online_computers_top: end-to-end test of the three converters at the
// default sizes, each fed its own random pulse stream.
//
// Every converter receives 1000 input pulses of random width (1 to 3 clocks).
// A new pulse is sent only after the previous one was taken, after a random
// gap of 0 to 12 clocks, so many pulses arrive while an output series is still
// running and wait in the held request. After the stream the output counters
// must equal [x^(3/2)+0.5], [x^(2/3)+0.5] and [sqrt(x)+0.5] at x = 1000 and
// the input counters 1000, and the output bits seen on y each clock must add
// up to the counters. The test counts the mechanisms the design has and fails
// if one never happened: an input bit answered by a series of two or more
// output bits, by exactly one, or by none (sampling); a request held while the
// unit was busy; a counter preset; a reset in the middle of a series.
module tb_online_computers_top;
  import oc_pkg::*;

  localparam int NX = 1000;
  localparam int NU = 3;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic cnt_load = 1'b0;
  logic [15:0] cnt_data = '0;
  logic                x [NU];
  logic                y [NU], y_out [NU], ready [NU], impulse [NU];
  oc_state_e           state [NU];
  logic signed [31:0]  sm_res [NU];
  logic [15:0]         y_count [NU], x_count [NU];

  int checks = 0, failures = 0;
  int y_seen [NU] = '{0, 0, 0};
  int n_series = 0, n_single = 0, n_none = 0, n_held = 0, n_preset = 0, n_reset_mid = 0;
  int run [NU] = '{0, 0, 0};
  bit done [NU] = '{0, 0, 0};

  always #5 clk = ~clk;

  online_computers_top dut (
    .clk, .rst, .cnt_load, .cnt_data,
    .x_pow32(x[0]), .y_pow32(y[0]), .y_out_pow32(y_out[0]), .ready_pow32(ready[0]),
    .impulse_pow32(impulse[0]), .state_pow32(state[0]), .sm_res_pow32(sm_res[0]),
    .y_count_pow32(y_count[0]), .x_count_pow32(x_count[0]),
    .x_pow23(x[1]), .y_pow23(y[1]), .y_out_pow23(y_out[1]), .ready_pow23(ready[1]),
    .impulse_pow23(impulse[1]), .state_pow23(state[1]), .sm_res_pow23(sm_res[1]),
    .y_count_pow23(y_count[1]), .x_count_pow23(x_count[1]),
    .x_sqrt(x[2]), .y_sqrt(y[2]), .y_out_sqrt(y_out[2]), .ready_sqrt(ready[2]),
    .impulse_sqrt(impulse[2]), .state_sqrt(state[2]), .sm_res_sqrt(sm_res[2]),
    .y_count_sqrt(y_count[2]), .x_count_sqrt(x_count[2])
  );

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic longint lpow(longint b, int e);
    longint r = 1;
    for (int i = 0; i < e; i++) r *= b;
    return r;
  endfunction

  // Largest y with (2y-1)^n <= 2^n x^m, i.e. [x^(m/n) + 0.5].
  function automatic int ref_y(int xv, int m, int n);
    longint yy = 0;
    while (lpow(2 * (yy + 1) - 1, n) <= lpow(2, n) * lpow(xv, m)) yy++;
    return int'(yy);
  endfunction

  localparam int MS [NU] = '{3, 2, 1};
  localparam int NS [NU] = '{2, 3, 2};

  // Observe output bits and classify each input bit's answer by the run of
  // a2 clocks that follows its a1 clock.
  always @(posedge clk) if (!rst) begin
    for (int u = 0; u < NU; u++) begin
      if (y[u]) y_seen[u]++;
      if (impulse[u] && !ready[u]) n_held++;
      if (state[u] == A1) run[u] = 0;
      else if (state[u] == A2) run[u]++;
      if (state[u] == A0 && ready[u] && run[u] >= 0) begin
        if (run[u] >= 2) n_series++;
        else if (run[u] == 1) n_single++;
        else n_none++;
        run[u] = -1;
      end
    end
  end

  task automatic stream(int u);
    for (int i = 1; i <= NX; i++) begin
      while (int'(x_count[u]) != i - 1) @(negedge clk);
      repeat ($urandom_range(0, 12)) @(negedge clk);
      x[u] = 1'b1;
      repeat ($urandom_range(1, 3)) @(negedge clk);
      x[u] = 1'b0;
    end
    while (int'(x_count[u]) != NX || !ready[u] || impulse[u]) @(negedge clk);
    done[u] = 1'b1;
  endtask

  initial begin
    for (int u = 0; u < NU; u++) begin x[u] = 1'b0; run[u] = -1; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    fork
      stream(0);
      stream(1);
      stream(2);
    join
    repeat (4) @(negedge clk);

    for (int u = 0; u < NU; u++) begin
      int want;
      want = ref_y(NX, MS[u], NS[u]);
      check(int'(y_count[u]) == want, $sformatf("unit %0d y_count %0d expected %0d", u, y_count[u], want));
      check(int'(x_count[u]) == NX, $sformatf("unit %0d x_count %0d", u, x_count[u]));
      check(y_seen[u] == want, $sformatf("unit %0d output bits seen %0d", u, y_seen[u]));
      $display("unit %0d: x = %0d, y = %0d", u, x_count[u], y_count[u]);
    end

    // Counter preset on all three converters.
    cnt_data = 16'h1234;
    cnt_load = 1'b1;
    @(negedge clk) cnt_load = 1'b0;
    for (int u = 0; u < NU; u++)
      check(y_count[u] == 16'h1234 && x_count[u] == 16'h1234, $sformatf("unit %0d preset", u));
    n_preset++;

    // Reset while the power 3/2 converter generates a series.
    x[0] = 1'b1;
    repeat (2) @(negedge clk);
    x[0] = 1'b0;
    while (state[0] != A2) @(negedge clk);
    repeat (3) @(negedge clk);
    check(state[0] == A2, "pow32 still in a series");
    rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    n_reset_mid++;
    for (int u = 0; u < NU; u++)
      check(state[u] == A0 && sm_res[u] == -1 && y_count[u] == 0 && x_count[u] == 0,
            $sformatf("unit %0d restarted by reset", u));
    // First input bit after the reset gives y = 1 on every unit.
    for (int u = 0; u < NU; u++) x[u] = 1'b1;
    repeat (2) @(negedge clk);
    for (int u = 0; u < NU; u++) x[u] = 1'b0;
    repeat (12) @(negedge clk);
    for (int u = 0; u < NU; u++)
      check(y_count[u] == 1 && x_count[u] == 1, $sformatf("unit %0d y(1) = 1 after reset", u));

    $display("series=%0d single=%0d none=%0d held=%0d preset=%0d reset_mid=%0d",
             n_series, n_single, n_none, n_held, n_preset, n_reset_mid);
    check(n_series > 0, "series generation happened");
    check(n_single > 0, "single output bit happened");
    check(n_none > 0, "input bit with no output bit happened");
    check(n_held > 0, "held request happened");
    check(n_preset > 0, "counter preset happened");
    check(n_reset_mid > 0, "reset in a series happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
