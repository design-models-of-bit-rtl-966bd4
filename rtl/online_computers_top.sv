// online_computers_top: the three bit-stream online computers side by side.
//
//   pow32 : y = [x^(3/2) + 0.5], series-generation mode (exponent above one);
//           Block1 = SM1, Count, RG1 = 24; Block2 = SM2, RG2 = 8.
//   pow23 : y = [x^(2/3) + 0.5], bit-sampling (number divider) mode;
//           Block1 = counter, RG1 = 16; Block2 = two stages, RG2 = 48.
//   sqrt  : y = [sqrt(x) + 0.5], bit-sampling mode;
//           Block1 = RG1 = 4; Block2 = SM1, RG2 = 8.
//
// Each computer has its own input stream, output stream, ready flag and binary
// counters; only clock, reset and the counter preset are shared. They are the
// three configurations of the generalized architecture that are worked out and
// simulated; putting them in one top is this design's choice. Timing per
// computer is that of bitstream_converter.
module online_computers_top
  import oc_pkg::*;
#(
  parameter int unsigned WIDTH     = 32,
  parameter int unsigned CNT_WIDTH = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    cnt_load,
  input  logic [CNT_WIDTH-1:0]    cnt_data,

  input  logic                    x_pow32,
  output logic                    y_pow32,
  output logic                    y_out_pow32,
  output logic                    ready_pow32,
  output logic                    impulse_pow32,
  output oc_state_e               state_pow32,
  output logic signed [WIDTH-1:0] sm_res_pow32,
  output logic [CNT_WIDTH-1:0]    y_count_pow32,
  output logic [CNT_WIDTH-1:0]    x_count_pow32,

  input  logic                    x_pow23,
  output logic                    y_pow23,
  output logic                    y_out_pow23,
  output logic                    ready_pow23,
  output logic                    impulse_pow23,
  output oc_state_e               state_pow23,
  output logic signed [WIDTH-1:0] sm_res_pow23,
  output logic [CNT_WIDTH-1:0]    y_count_pow23,
  output logic [CNT_WIDTH-1:0]    x_count_pow23,

  input  logic                    x_sqrt,
  output logic                    y_sqrt,
  output logic                    y_out_sqrt,
  output logic                    ready_sqrt,
  output logic                    impulse_sqrt,
  output oc_state_e               state_sqrt,
  output logic signed [WIDTH-1:0] sm_res_sqrt,
  output logic [CNT_WIDTH-1:0]    y_count_sqrt,
  output logic [CNT_WIDTH-1:0]    x_count_sqrt
);

  bitstream_converter #(.WIDTH(WIDTH), .M(3), .N(2), .CNT_WIDTH(CNT_WIDTH)) u_pow32 (
    .clk, .rst, .x(x_pow32), .cnt_load, .y_count_data(cnt_data), .x_count_data(cnt_data),
    .y(y_pow32), .y_out(y_out_pow32), .ready(ready_pow32), .impulse(impulse_pow32),
    .state(state_pow32), .sm_res(sm_res_pow32), .y_count(y_count_pow32), .x_count(x_count_pow32)
  );

  bitstream_converter #(.WIDTH(WIDTH), .M(2), .N(3), .CNT_WIDTH(CNT_WIDTH)) u_pow23 (
    .clk, .rst, .x(x_pow23), .cnt_load, .y_count_data(cnt_data), .x_count_data(cnt_data),
    .y(y_pow23), .y_out(y_out_pow23), .ready(ready_pow23), .impulse(impulse_pow23),
    .state(state_pow23), .sm_res(sm_res_pow23), .y_count(y_count_pow23), .x_count(x_count_pow23)
  );

  bitstream_converter #(.WIDTH(WIDTH), .M(1), .N(2), .CNT_WIDTH(CNT_WIDTH)) u_sqrt (
    .clk, .rst, .x(x_sqrt), .cnt_load, .y_count_data(cnt_data), .x_count_data(cnt_data),
    .y(y_sqrt), .y_out(y_out_sqrt), .ready(ready_sqrt), .impulse(impulse_sqrt),
    .state(state_sqrt), .sm_res(sm_res_sqrt), .y_count(y_count_sqrt), .x_count(x_count_sqrt)
  );

endmodule
