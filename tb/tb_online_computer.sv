// tb_online_computer: self-checking test of the arithmetic unit in its three
// configurations, power 3/2 (M=3,N=2), power 2/3 (M=2,N=3) and square root
// (M=1,N=2).
//
// Input bits are offered one at a time. After each one the test counts the
// output bits and the clocks until the unit is ready again, and compares
//   * the running output count with the largest y for which
//     (2y-1)^N <= 2^N x^M, found here by direct search with 64-bit powers;
//   * the busy time with k + 1 clocks (a1 plus one a2 clock per output bit);
//   * SM_RES after each of the first input bits with the worked examples:
//     power 3/2 -5,-17,-13,-33,-29,-97,-149; square root -5,-1,-13,-9,-5,-1,
//     -21,-17,-13,-9,-5,-1,-29; power 2/3 7,5,3,49 after the addition for the
//     inputs that produce an output and -19,-93,-53,-215,-143,-55 after the
//     first six inputs, -363 after the eleventh.
module tb_online_computer;
  import oc_pkg::*;

  localparam int unsigned WIDTH = 32;
  localparam int          NU    = 3;
  localparam int unsigned MS [NU] = '{3, 2, 1};
  localparam int unsigned NS [NU] = '{2, 3, 2};
  localparam int          XMAX  = 3000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic                    impulse [NU];
  logic                    ready   [NU];
  logic                    y       [NU];
  oc_state_e               state   [NU];
  logic signed [WIDTH-1:0] sm_res  [NU];

  int checks   = 0;
  int failures = 0;

  always #5 clk = ~clk;

  for (genvar u = 0; u < NU; u++) begin : g_dut
    online_computer #(.WIDTH(WIDTH), .M(MS[u]), .N(NS[u])) dut (
      .clk, .rst, .impulse(impulse[u]), .ready(ready[u]), .y(y[u]),
      .state(state[u]), .sm_res(sm_res[u])
    );
  end

  // Watchdog.
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint lpow(longint b, int unsigned e);
    longint r = 1;
    for (int unsigned i = 0; i < e; i++) r *= b;
    return r;
  endfunction

  // Reference: [x^(m/n) + 0.5] as the largest y with (2y-1)^n <= 2^n x^m.
  function automatic longint ref_y(longint x, int unsigned m, int unsigned n);
    longint yy = 0;
    longint lhs = lpow(2, n) * lpow(x, m);
    while (lpow(2 * (yy + 1) - 1, n) <= lhs) yy++;
    return yy;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Offer one input bit to unit u; return output bits, busy clocks, SM_RES in
  // the first a2 clock (after the addition) and SM_RES when ready again.
  task automatic feed(int u, output int nbits, output int busy,
                      output longint after_add, output longint after_all);
    nbits = 0; busy = 0; after_add = 0;
    @(negedge clk);
    check(ready[u] === 1'b1, $sformatf("unit %0d ready before input", u));
    impulse[u] = 1'b1;
    @(negedge clk);
    impulse[u] = 1'b0;
    check(state[u] == A1, $sformatf("unit %0d in a1 after impulse", u));
    after_add = longint'(sm_res[u]);
    while (!ready[u]) begin
      busy++;
      if (y[u]) begin
        if (nbits == 0) after_add = longint'(sm_res[u]);
        nbits++;
      end
      @(negedge clk);
      if (busy > 100_000) break;
    end
    after_all = longint'(sm_res[u]);
  endtask

  longint exp32_res [7]  = '{-5, -17, -13, -33, -29, -97, -149};
  int     exp32_bits[7]  = '{1, 2, 2, 3, 3, 4, 4};
  longint expsq_res [13] = '{-5, -1, -13, -9, -5, -1, -21, -17, -13, -9, -5, -1, -29};
  longint exp23_res [6]  = '{-19, -93, -53, -215, -143, -55};
  longint exp23_add [4]  = '{7, 5, 3, 49};
  int     exp23_x   [4]  = '{1, 2, 4, 7};

  initial begin
    for (int u = 0; u < NU; u++) impulse[u] = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    for (int u = 0; u < NU; u++) begin
      longint ycount;
      int     nb, busy, k23;
      longint aa, ar;
      ycount = 0;
      k23    = 0;
      check(sm_res[u] == -1, $sformatf("unit %0d SM_RES starts at -1", u));
      for (int x = 1; x <= XMAX; x++) begin
        longint want;
        feed(u, nb, busy, aa, ar);
        ycount += nb;
        want = ref_y(x, MS[u], NS[u]);
        check(ycount == want,
              $sformatf("unit %0d x=%0d y=%0d expected %0d", u, x, ycount, want));
        check(busy == nb + 1,
              $sformatf("unit %0d x=%0d busy %0d clocks for %0d bits", u, x, busy, nb));
        if (u == 0 && x <= 7) begin
          check(ar == exp32_res[x-1], $sformatf("pow32 x=%0d SM_RES %0d expected %0d", x, ar, exp32_res[x-1]));
          check(nb == exp32_bits[x-1], $sformatf("pow32 x=%0d series of %0d bits", x, nb));
        end
        if (u == 1) begin
          if (x <= 6)
            check(ar == exp23_res[x-1], $sformatf("pow23 x=%0d SM_RES %0d expected %0d", x, ar, exp23_res[x-1]));
          if (x == 11) check(ar == -363, $sformatf("pow23 x=11 SM_RES %0d expected -363", ar));
          if (nb > 0 && k23 < 4) begin
            check(x == exp23_x[k23], $sformatf("pow23 output bit %0d at x=%0d", k23 + 1, x));
            check(aa == exp23_add[k23], $sformatf("pow23 x=%0d SM_RES after add %0d", x, aa));
            k23++;
          end
        end
        if (u == 2 && x <= 13)
          check(ar == expsq_res[x-1], $sformatf("sqrt x=%0d SM_RES %0d expected %0d", x, ar, expsq_res[x-1]));
      end
      $display("unit M=%0d N=%0d: y(%0d) = %0d", MS[u], NS[u], XMAX, ycount);
    end

    // Reset in the middle of a series returns to a0 and restarts the function.
    @(negedge clk) impulse[0] = 1'b1;
    @(negedge clk) impulse[0] = 1'b0;
    @(negedge clk) rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    check(state[0] == A0 && sm_res[0] == -1, "reset returns pow32 to a0, SM_RES = -1");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
