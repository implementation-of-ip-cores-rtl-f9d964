// Standard Montgomery modular multiplier (radix 2, bit-serial).
//
// Computes p = X * Y * 2^-N mod M for an odd modulus M and 0 <= X, Y < M.
// X sits in a right-shifting register whose LSB gives the current bit x_i.
// Each clock cycle performs one loop iteration with two carry-propagate
// adders: P := P + x_i*Y, then P := P + p_0*M (adding M when the partial
// result is odd makes it even), then P := P / 2, which is wiring.  After N
// iterations P < 2M; a comparator, subtractor and multiplexer at the
// output bring it below M.
//
// Interface (pins of the published core: M, X, Y, Clk, RESET, P, DONE):
// while `reset` is high X, Y and M are captured and P is cleared.  The
// loop runs for the N clock cycles after `reset` falls; `done` rises on the
// edge that ends the last iteration and `p` is valid from then until the
// next reset.  Latency: N clock cycles.  The final reduction is
// combinational on the output.
//
// The loop structure, the adders and the output reduction follow the
// published block diagram.  Capturing Y and M in registers, the
// synchronous reset-as-start protocol and the one-iteration-per-cycle
// timing are this design's choices.  To use the core as an ordinary
// modular multiplier, first convert one operand: Mont(X, 2^2N mod M) = X*2^N
// mod M, then Mont(X*2^N mod M, Y) = X*Y mod M.
module mont_std #(
  parameter int unsigned N = 1024
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] m,
  output logic [N-1:0] p,
  output logic         done
);

  logic [N-1:0] x_sr, y_r, m_r;
  logic [N:0]   p_r;          // loop result, always below 2M
  logic [N+1:0] sum1, sum2;   // below 4M
  logic         step;
  logic [$clog2(N+1)-1:0] idx;
  logic [N:0]   p_red;

  loop_ctrl #(.N(N)) u_ctrl (
    .clk  (clk),
    .reset(reset),
    .step (step),
    .idx  (idx),
    .done (done)
  );

  // One iteration of the controlled loop: two adders, then shift right.
  always_comb begin
    sum1 = {1'b0, p_r} + (x_sr[0] ? {2'b00, y_r} : '0);
    sum2 = sum1 + (sum1[0] ? {2'b00, m_r} : '0);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      x_sr <= x;
      y_r  <= y;
      m_r  <= m;
      p_r  <= '0;
    end else if (step) begin
      x_sr <= x_sr >> 1;
      p_r  <= sum2[N+1:1];
    end
  end

  final_reduce #(.W(N + 1)) u_reduce (
    .p_in (p_r),
    .m    ({1'b0, m_r}),
    .p_out(p_red),
    .sub  ()
  );

  assign p = p_red[N-1:0];

  // done marks exactly N completed iterations.
  a_count : assert property (@(posedge clk) disable iff (reset) done |-> idx == ($bits(idx))'(N));

endmodule
