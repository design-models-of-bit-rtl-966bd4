// result_adder: SM_RES, the parallel adder with feedback that compares the two
// step functions.
//
// SM_RES accumulates L(x) - R(y) - 1: in state a1 the argument increment from
// Block1 is added (gate &1 opened by the accepted input bit), in state a2 the
// result increment from Block2 is subtracted (gate &2 opened by the output
// bit). Its sign bit is the comparison result: SM_RES >= 0 means the next
// output bit is due. `nonneg_next` is the sign of the value being loaded in the
// current clock, which the control unit needs to choose the state that follows
// the microoperation; `nonneg` is the sign of the stored value.
//
// One registered addition or subtraction per clock; add and sub are never set
// together (asserted). Start value after the synchronous reset is L(0) - R(1),
// that is -1. Width is WIDTH bits, signed, this design's choice.
module result_adder
  import oc_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned M     = 3,
  parameter int unsigned N     = 2
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    add,      // a1: SM_RES = SM_RES + Block1
  input  logic                    sub,      // a2: SM_RES = SM_RES - Block2
  input  logic signed [WIDTH-1:0] incr_arg, // from Block1
  input  logic signed [WIDTH-1:0] incr_res, // from Block2
  output logic signed [WIDTH-1:0] sm_res,
  output logic                    nonneg,
  output logic                    nonneg_next
);

  localparam logic signed [WIDTH-1:0] INIT = WIDTH'(res_init(M, N));

  logic signed [WIDTH-1:0] gated_arg, gated_res, sum;

  // The two AND gates of the generalized architecture.
  assign gated_arg = add ? incr_arg : '0;
  assign gated_res = sub ? incr_res : '0;
  assign sum       = sm_res + gated_arg - gated_res;

  always_ff @(posedge clk) begin
    if (rst) sm_res <= INIT;
    else     sm_res <= sum;
  end

  assign nonneg      = !sm_res[WIDTH-1];
  assign nonneg_next = !sum[WIDTH-1];

  a_exclusive: assert property (@(posedge clk) disable iff (rst) !(add && sub))
    else $error("result_adder: add and sub requested in the same clock");

endmodule
