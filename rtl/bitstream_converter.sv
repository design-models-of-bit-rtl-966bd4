// bitstream_converter: complete bit-stream online computer for one function
// y = [x^(M/N) + 0.5]: impulse detector, arithmetic unit and result counters.
//
// The input pulse stream x goes through the impulse detector, whose held
// request is taken by the arithmetic unit (online_computer) when it is ready.
// The unit answers each input bit with zero, one or a series of output bits on
// `y`, one clock each. `y_out` is y ANDed with the clock, as in the synthesized
// schematic, so that back-to-back output bits leave as separate pulses: each
// output bit appears as a pulse in the high phase of its clock. Because y
// changes just after the rising edge, the gate can leave a runt pulse of
// clock-to-output width at the edge where a series ends; a receiver should
// sample y_out in the high phase or use the registered `y` instead. Two
// counters give the results in binary: `y_count` counts output bits (the
// function value) and `x_count` counts the input bits taken (the argument).
// Both counters can be preset through `cnt_load` and the data ports, for
// example to restart the binary readout of a new measurement window.
//
// Impulse detector plus arithmetic unit is the block diagram of the computer;
// the output AND gate and the counter element come from the synthesized
// schematic. The two counters' connections are this design's choice. Timing:
// SYNC_STAGES + 1 clocks from a rising edge of x to the request, then k + 2
// clocks per input bit that raises the function by k.
module bitstream_converter
  import oc_pkg::*;
#(
  parameter int unsigned WIDTH       = 32,
  parameter int unsigned M           = 3,
  parameter int unsigned N           = 2,
  parameter int unsigned CNT_WIDTH   = 16,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    x,
  input  logic                    cnt_load,
  input  logic [CNT_WIDTH-1:0]    y_count_data,
  input  logic [CNT_WIDTH-1:0]    x_count_data,
  output logic                    y,
  output logic                    y_out,
  output logic                    ready,
  output logic                    impulse,
  output oc_state_e               state,
  output logic signed [WIDTH-1:0] sm_res,
  output logic [CNT_WIDTH-1:0]    y_count,
  output logic [CNT_WIDTH-1:0]    x_count
);

  logic taken;

  impulse_detector #(.SYNC_STAGES(SYNC_STAGES)) u_detect (
    .clk, .rst, .x, .accept(ready), .impulse
  );

  online_computer #(.WIDTH(WIDTH), .M(M), .N(N)) u_computer (
    .clk, .rst, .impulse, .ready, .y, .state, .sm_res
  );

  assign taken = ready && impulse;
  assign y_out = y & clk;

  pulse_counter #(.WIDTH(CNT_WIDTH)) u_y_count (
    .clk, .rst, .clken(y), .load(cnt_load), .data(y_count_data), .q(y_count)
  );

  pulse_counter #(.WIDTH(CNT_WIDTH)) u_x_count (
    .clk, .rst, .clken(taken), .load(cnt_load), .data(x_count_data), .q(x_count)
  );

endmodule
