// tb_published_examples: replays the three worked examples through the
// complete top, input pulse by input pulse, and checks every register of the
// difference tables, not only the output.
//
//   x^(3/2), 7 input pulses: output series of 1,2,2,3,3,4,4 bits (y = 1, 3, 5,
//     8, 11, 15, 19); after each pulse SM_RES -5,-17,-13,-33,-29,-97,-149,
//     SM1 28,76,148,244,364,508,676, Count 48,72,...,192, SM2 16,32,48,72,96,
//     128,160.
//   x^(2/3), 11 input pulses: output bits at pulses 1, 2, 4, 7, 10; the Block1
//     register is 8 + 16x; Block2 registers 98/120, 218/168, 386/216,
//     602/264, 866/312 after outputs 1..5; SM_RES -363 at the end.
//   sqrt(x), 13 input pulses: output bits at pulses 1, 3, 7, 13; SM1 16, 24,
//     32, 40 after each output bit; SM_RES -5,-1,-13,-9,-5,-1,-21,-17,-13,-9,
//     -5,-1,-29.
module tb_published_examples;
  import oc_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic x [3];
  logic y [3], y_out [3], ready [3], impulse [3];
  oc_state_e state [3];
  logic signed [31:0] sm_res [3];
  logic [15:0] y_count [3], x_count [3];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  online_computers_top dut (
    .clk, .rst, .cnt_load(1'b0), .cnt_data(16'd0),
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

  // Difference-table registers of the three computers.
  wire signed [31:0] p32_sm1   = dut.u_pow32.u_computer.u_block1.g_chain.s[0];
  wire signed [31:0] p32_count = dut.u_pow32.u_computer.u_block1.g_chain.s[1];
  wire signed [31:0] p32_sm2   = dut.u_pow32.u_computer.u_block2.g_chain.s[0];
  wire signed [31:0] p23_cnt   = dut.u_pow23.u_computer.u_block1.g_chain.s[0];
  wire signed [31:0] p23_sum2  = dut.u_pow23.u_computer.u_block2.g_chain.s[0];
  wire signed [31:0] p23_sum3  = dut.u_pow23.u_computer.u_block2.g_chain.s[1];
  wire signed [31:0] sq_sm1    = dut.u_sqrt.u_computer.u_block2.g_chain.s[0];

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One input pulse on converter u; returns the output bits it produced.
  task automatic pulse(int u, output int nbits);
    int t;
    nbits = 0;
    t = 0;
    x[u] = 1'b1;
    repeat (2) @(negedge clk);
    x[u] = 1'b0;
    // Wait for the request to be taken, then for the unit to finish.
    while (ready[u] && t < 20) begin @(negedge clk); t++; end
    while (!ready[u]) begin
      if (y[u]) nbits++;
      @(negedge clk);
    end
    repeat (2) @(negedge clk);
  endtask

  int     s32_bits [7] = '{1, 2, 2, 3, 3, 4, 4};
  int     s32_y    [7] = '{1, 3, 5, 8, 11, 15, 19};
  longint s32_res  [7] = '{-5, -17, -13, -33, -29, -97, -149};
  longint s32_sm1  [7] = '{28, 76, 148, 244, 364, 508, 676};
  longint s32_cnt  [7] = '{48, 72, 96, 120, 144, 168, 192};
  longint s32_sm2  [7] = '{16, 32, 48, 72, 96, 128, 160};
  longint s23_sum2 [5] = '{98, 218, 386, 602, 866};
  longint s23_sum3 [5] = '{120, 168, 216, 264, 312};
  int     s23_at   [5] = '{1, 2, 4, 7, 10};
  longint sq_res   [13] = '{-5, -1, -13, -9, -5, -1, -21, -17, -13, -9, -5, -1, -29};
  int     sq_at    [4] = '{1, 3, 7, 13};

  initial begin
    int nb, k;
    for (int u = 0; u < 3; u++) x[u] = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(p32_sm1 == 4 && p32_count == 24 && p32_sm2 == 8 && sm_res[0] == -1,
          "x^(3/2) start values SM1=4 Count=24 SM2=8 SM_RES=-1");
    check(p23_cnt == 8 && p23_sum2 == 26 && p23_sum3 == 72 && sm_res[1] == -1,
          "x^(2/3) start values 8, 26, 72, -1");
    check(sq_sm1 == 8 && sm_res[2] == -1, "sqrt start values SM1=8 SM_RES=-1");

    for (int i = 0; i < 7; i++) begin
      pulse(0, nb);
      check(nb == s32_bits[i], $sformatf("x^(3/2) x=%0d series of %0d bits", i + 1, nb));
      check(int'(y_count[0]) == s32_y[i], $sformatf("x^(3/2) x=%0d y=%0d", i + 1, y_count[0]));
      check(longint'(sm_res[0]) == s32_res[i], $sformatf("x^(3/2) x=%0d SM_RES=%0d", i + 1, sm_res[0]));
      check(longint'(p32_sm1) == s32_sm1[i], $sformatf("x^(3/2) x=%0d SM1=%0d", i + 1, p32_sm1));
      check(longint'(p32_count) == s32_cnt[i], $sformatf("x^(3/2) x=%0d Count=%0d", i + 1, p32_count));
      check(longint'(p32_sm2) == s32_sm2[i], $sformatf("x^(3/2) x=%0d SM2=%0d", i + 1, p32_sm2));
    end

    k = 0;
    for (int i = 1; i <= 11; i++) begin
      pulse(1, nb);
      check(longint'(p23_cnt) == 8 + 16 * i, $sformatf("x^(2/3) x=%0d counter=%0d", i, p23_cnt));
      if (nb > 0) begin
        check(nb == 1 && k < 5 && i == s23_at[k], $sformatf("x^(2/3) output bit at x=%0d", i));
        check(longint'(p23_sum2) == s23_sum2[k] && longint'(p23_sum3) == s23_sum3[k],
              $sformatf("x^(2/3) x=%0d sum_2=%0d sum_3=%0d", i, p23_sum2, p23_sum3));
        k++;
      end
    end
    check(k == 5 && y_count[1] == 5, "x^(2/3) five output bits in eleven inputs");
    check(sm_res[1] == -363 && p23_cnt == 184 && p23_sum2 == 866 && p23_sum3 == 312,
          "x^(2/3) final register values -363, 184, 866, 312");

    k = 0;
    for (int i = 1; i <= 13; i++) begin
      pulse(2, nb);
      check(longint'(sm_res[2]) == sq_res[i-1], $sformatf("sqrt x=%0d SM_RES=%0d", i, sm_res[2]));
      if (nb > 0) begin
        check(nb == 1 && k < 4 && i == sq_at[k], $sformatf("sqrt output bit at x=%0d", i));
        check(longint'(sq_sm1) == 16 + 8 * k, $sformatf("sqrt x=%0d SM1=%0d", i, sq_sm1));
        k++;
      end
    end
    check(k == 4 && y_count[2] == 4 && x_count[2] == 13, "sqrt y = 4 after 13 inputs");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
