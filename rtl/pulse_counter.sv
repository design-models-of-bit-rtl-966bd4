// pulse_counter: binary counter of single-clock pulses.
//
// Counts the clocks in which `clken` is high, wrapping at 2^WIDTH, and can be
// loaded synchronously with `data` (`load` has priority over counting). In the
// converter one counter turns the output bit stream y into the binary value of
// the function and another counts the input bits taken, i.e. the argument x.
// The counter element and its data, clock-enable and clock ports appear in the
// synthesized schematic of the power function computer; its width, the load
// control and where it is connected are this design's choices. Reset is
// synchronous and active high and clears the count.
module pulse_counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clken,
  input  logic             load,
  input  logic [WIDTH-1:0] data,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)        q <= '0;
    else if (load)  q <= data;
    else if (clken) q <= q + 1'b1;
  end

endmodule
