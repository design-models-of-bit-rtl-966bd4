// tb_increment_block: checks the adder pipelines against directly computed
// increments. For each configuration the increment presented after p steps
// must equal f(p+1) - f(p), with f(x) = 2^N x^M for the left side (starting at
// x = 0) and f(y) = (2y-1)^N for the right side (starting at y = 1). The
// printed series of the worked examples (4, 28, 76, 148, ... and 8, 16, 24, ...
// and 26, 98, 218, 386) are special cases. A clock without `step` must hold
// the value, and reset must restore the start value.
module tb_increment_block;
  import oc_pkg::*;

  localparam int unsigned WIDTH = 40;
  localparam int NC = 6;
  localparam side_e       SD [NC] = '{SIDE_LEFT, SIDE_RIGHT, SIDE_LEFT, SIDE_RIGHT, SIDE_LEFT, SIDE_LEFT};
  localparam int unsigned MS [NC] = '{3, 3, 2, 2, 1, 4};
  localparam int unsigned NS [NC] = '{2, 2, 3, 3, 2, 3};

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic step [NC];
  logic signed [WIDTH-1:0] incr [NC];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar c = 0; c < NC; c++) begin : g_dut
    increment_block #(.WIDTH(WIDTH), .SIDE(SD[c]), .M(MS[c]), .N(NS[c])) dut (
      .clk, .rst, .step(step[c]), .incr(incr[c])
    );
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint lpow(longint b, int unsigned e);
    longint r = 1;
    for (int unsigned i = 0; i < e; i++) r *= b;
    return r;
  endfunction

  function automatic longint f(int c, longint p);
    if (SD[c] == SIDE_LEFT) return lpow(2, NS[c]) * lpow(p, MS[c]);
    else                    return lpow(2 * p - 1, NS[c]);
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint printed_l32 [8] = '{4, 28, 76, 148, 244, 364, 508, 676};
  longint printed_r23 [4] = '{26, 98, 218, 386};

  initial begin
    for (int c = 0; c < NC; c++) step[c] = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int c = 0; c < NC; c++) begin
      longint p0;
      p0 = (SD[c] == SIDE_LEFT) ? 0 : 1;
      for (int p = 0; p < 300; p++) begin
        longint want;
        want = f(c, p0 + p + 1) - f(c, p0 + p);
        check(longint'(incr[c]) == want,
              $sformatf("config %0d point %0d incr %0d expected %0d", c, p, incr[c], want));
        if (c == 0 && p < 8) check(longint'(incr[c]) == printed_l32[p], "power 3/2 Block1 series");
        if (c == 3 && p < 4) check(longint'(incr[c]) == printed_r23[p], "power 2/3 Block2 series");
        if (p % 7 == 3) begin
          @(negedge clk);
          check(longint'(incr[c]) == want, $sformatf("config %0d holds without step", c));
        end
        step[c] = 1'b1;
        @(negedge clk);
        step[c] = 1'b0;
      end
    end
    @(negedge clk) rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    check(incr[0] == 4 && incr[1] == 8 && incr[4] == 4, "reset restores start values");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
