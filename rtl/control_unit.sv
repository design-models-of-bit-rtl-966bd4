// control_unit: Moore state machine that sequences the online computer.
//
// Three states. a0 waits for an input bit (`impulse`) and raises `ready`. On an
// impulse it moves to a1, where the argument side advances (Block1 steps and
// SM_RES adds its increment). If the adder result is non-negative the machine
// enters a2, otherwise it returns to a0. Every clock in a2 emits one output
// bit `y`, advances the result side (Block2 steps and SM_RES subtracts its
// increment) and stays in a2 while the result is still non-negative. So one
// input bit yields as many output bits as the step function rises at that
// argument: none (sampling mode, exponent below one), one, or a series
// (series-generation mode, exponent above one).
//
// The states, transitions and outputs follow the state diagram and the
// operating-unit flowcharts. Each transition condition tests the value that
// the microoperation of the current state is writing into SM_RES
// (`nonneg_next`), as in the flowcharts where the test follows the operator
// box. Outputs are decoded from the state only. Reset is synchronous and
// active high and returns the machine to a0.
module control_unit
  import oc_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      impulse,      // an input bit is waiting
  input  logic      nonneg_next,  // SM_RES >= 0 after this clock's operation
  output oc_state_e state,
  output logic      ready,        // a0: next input bit may be taken
  output logic      step_arg,     // a1: advance Block1, SM_RES += Block1
  output logic      step_res,     // a2: advance Block2, SM_RES -= Block2
  output logic      y             // a2: output bit
);

  oc_state_e next_state;

  always_comb begin
    next_state = state;
    unique case (state)
      A0:      next_state = impulse     ? A1 : A0;
      A1:      next_state = nonneg_next ? A2 : A0;
      A2:      next_state = nonneg_next ? A2 : A0;
      default: next_state = A0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= A0;
    else     state <= next_state;
  end

  assign ready    = (state == A0);
  assign step_arg = (state == A1);
  assign step_res = (state == A2);
  assign y        = (state == A2);

  a_legal_state: assert property (@(posedge clk) disable iff (rst) state inside {A0, A1, A2})
    else $error("control_unit: illegal state");
  a_a1_one_clock: assert property (@(posedge clk) disable iff (rst) state == A1 |=> state != A1)
    else $error("control_unit: a1 lasted more than one clock");

endmodule
