// online_computer: arithmetic unit of a bit-stream online computer for
// y = [x^(M/N) + 0.5], following the generalized architecture.
//
// Block1 (increment_block, M-1 stages plus RG1) forms the increments of the
// argument function 2^N x^M, Block2 (N-1 stages plus RG2) those of the result
// function (2y-1)^N, and SM_RES (result_adder) keeps their running difference.
// The control unit takes one input bit (`impulse` while `ready`), adds one
// argument increment in a1, then subtracts result increments in a2, one per
// clock and one output bit `y` per clock, for as long as SM_RES stays
// non-negative. The count of `y` bits after x input bits is therefore the
// largest y with (2y-1)^N <= 2^N x^M, which is [x^(M/N) + 0.5] exactly.
//
// Timing: the impulse is taken in the a0 clock, a1 follows, then k clocks of
// a2 with y = 1 if the function steps up by k at this argument, then a0 again:
// k + 2 clocks per input bit. Configurations of the text: M=3,N=2 (power 3/2,
// series generation), M=2,N=3 (power 2/3, sampling) and M=1,N=2 (square root).
// The general M/N form and the start values derived from it are this design's
// generalisation of those three. Registers are WIDTH bits signed; the longest
// argument before the widest register overflows is about
// (2^(WIDTH-1) / (2^N * M!))^(1/(M-1)) for M > 1 (x below about 13,000 for
// power 3/2 at 32 bits) and 2^(WIDTH-3) for the square root; beyond it the
// result is wrong, and the stream must be restarted with `rst`.
module online_computer
  import oc_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned M     = 3,   // numerator of the exponent
  parameter int unsigned N     = 2    // denominator of the exponent
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    impulse,
  output logic                    ready,
  output logic                    y,
  output oc_state_e               state,
  output logic signed [WIDTH-1:0] sm_res
);

  logic                    step_arg, step_res, nonneg, nonneg_next;
  logic signed [WIDTH-1:0] incr_arg, incr_res;

  control_unit u_cu (
    .clk, .rst, .impulse, .nonneg_next,
    .state, .ready, .step_arg, .step_res, .y
  );

  increment_block #(.WIDTH(WIDTH), .SIDE(SIDE_LEFT), .M(M), .N(N)) u_block1 (
    .clk, .rst, .step(step_arg), .incr(incr_arg)
  );

  increment_block #(.WIDTH(WIDTH), .SIDE(SIDE_RIGHT), .M(M), .N(N)) u_block2 (
    .clk, .rst, .step(step_res), .incr(incr_res)
  );

  result_adder #(.WIDTH(WIDTH), .M(M), .N(N)) u_sm_res (
    .clk, .rst, .add(step_arg), .sub(step_res), .incr_arg, .incr_res,
    .sm_res, .nonneg, .nonneg_next
  );

  // While an output series runs, SM_RES was non-negative before each subtraction.
  a_series_sign: assert property (@(posedge clk) disable iff (rst) step_res |-> nonneg)
    else $error("online_computer: output bit emitted with negative SM_RES");

endmodule
