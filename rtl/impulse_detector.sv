// impulse_detector: turns the asynchronous sensor pulse stream x into one
// request per pulse for the arithmetic unit.
//
// x passes a SYNC_STAGES flip-flop synchronizer; a rising edge of the
// synchronized signal sets a pending flag, which is the `impulse` output. The
// flag stays set until the arithmetic unit takes it (`accept`, which is the
// unit's `ready`), so a pulse that arrives while an output series is still
// being generated is held and processed next. The flag holds one pulse: a
// second rising edge before the first is taken is merged with it and lost, so
// input pulses must be at least one processing period apart (k + 2 clocks for
// an argument step of k output bits).
//
// That the block detects input bits and presents impulse = 1 to the arithmetic
// unit is given; the synchronizer, the edge detection and the held request are
// this design's choices. Latency from a rising edge of x to `impulse` is
// SYNC_STAGES + 1 clocks. Reset is synchronous and active high.
module impulse_detector #(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic x,
  input  logic accept,
  output logic impulse
);

  logic [SYNC_STAGES-1:0] sync;
  logic                   x_prev;
  logic                   rise;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync   <= '0;
      x_prev <= 1'b0;
    end else begin
      sync   <= {sync[SYNC_STAGES-2:0], x};
      x_prev <= sync[SYNC_STAGES-1];
    end
  end

  assign rise = sync[SYNC_STAGES-1] && !x_prev;

  always_ff @(posedge clk) begin
    if (rst)                     impulse <= 1'b0;
    else if (rise)               impulse <= 1'b1;
    else if (accept && impulse)  impulse <= 1'b0;
  end

  initial begin
    assert (SYNC_STAGES >= 2) else $error("impulse_detector: SYNC_STAGES must be at least 2");
  end

endmodule
