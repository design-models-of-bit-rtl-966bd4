// increment_block: one of the two adder pipelines (Block1 or Block2) of the
// generalized online computer.
//
// The block holds the forward differences of a polynomial side function f (see
// oc_pkg) in a chain of STAGES registers s[0..STAGES-1] followed by a constant
// RG, which is the last, constant difference. On every `step` each register
// adds its right neighbour, s[j] <= s[j] + s[j+1], and the last one adds RG:
// these are the microoperations SM1 = SM1 + SM2, ..., SMm-1 = SMm-1 + RG1 of
// the operating-unit flowchart. `incr` is the increment f(p+1) - f(p) for the
// current point p, handed to the result adder; it is s[0], or RG itself when
// the chain is empty (the square-root computer's Block1 is just RG1 = 4; clk,
// rst and step are then unused, which lint reports).
//
// STAGES = M-1 for the left side (Block1) and N-1 for the right side (Block2).
// All registers add in parallel in the same clock, so `incr` moves to the next
// point one clock after `step`. The synchronous active-high reset reloads the
// start values computed from M and N. Register width is WIDTH bits, signed; the
// width and the reset style are this design's choices.
module increment_block
  import oc_pkg::*;
#(
  parameter int unsigned WIDTH  = 32,
  parameter side_e       SIDE   = SIDE_LEFT,
  parameter int unsigned M      = 3,
  parameter int unsigned N      = 2,
  parameter int unsigned STAGES = (SIDE == SIDE_LEFT) ? M - 1 : N - 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    step,
  output logic signed [WIDTH-1:0] incr
);

  // Constant last difference (RG1 / RG2).
  localparam longint RG_L = fwd_diff(SIDE, M, N, STAGES + 1);
  localparam logic signed [WIDTH-1:0] RG = WIDTH'(RG_L);

  if (STAGES == 0) begin : g_const
    assign incr = RG;
  end else begin : g_chain
    logic signed [WIDTH-1:0] s [STAGES];

    for (genvar j = 0; j < STAGES; j++) begin : g_stage
      localparam longint INIT_L = fwd_diff(SIDE, M, N, j + 1);
      logic signed [WIDTH-1:0] addend;
      if (j == STAGES - 1) begin : g_last
        assign addend = RG;
      end else begin : g_mid
        assign addend = s[j+1];
      end
      always_ff @(posedge clk) begin
        if (rst)       s[j] <= WIDTH'(INIT_L);
        else if (step) s[j] <= s[j] + addend;
      end
    end

    assign incr = s[0];
  end

endmodule
