// Loop controller of the iterative multipliers.
//
// A multiplication is started by holding `reset` high for at least one
// clock: the counter clears and `done` falls.  After `reset` falls the
// controller asserts `step` for exactly N clock cycles, one per loop
// iteration (one bit of the multiplier operand), and `idx` counts the
// iterations already done.  On the clock edge that ends the N-th iteration
// `done` rises and stays high, and `step` stays low, until the next reset.
// The reset-to-start protocol follows the RESET and DONE pins of the cores;
// the counter itself is this design's choice.  Synchronous, active-high
// reset.
module loop_ctrl #(
  parameter int unsigned N = 1024,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          reset,
  output logic          step,
  output logic [CW-1:0] idx,
  output logic          done
);

  localparam logic [CW-1:0] LAST = CW'(N - 1);

  always_ff @(posedge clk) begin
    if (reset) begin
      idx  <= '0;
      done <= 1'b0;
    end else if (!done) begin
      idx  <= idx + 1'b1;
      done <= (idx == LAST);
    end
  end

  assign step = !reset && !done;

endmodule
