// Standard interleaved modular multiplier (Blakley's method, bit-serial).
//
// Computes p = X * Y mod M directly, with no change of representation,
// for 0 <= Y < M and any N-bit X (the result stays below M as long as
// Y < M).  X sits in a left-shifting register whose MSB gives the current
// bit x_i, most significant first.  Each clock cycle performs one loop
// iteration: P := 2P + x_i*Y (shift left and one adder), then two
// comparator/subtractor/multiplexer stages each subtract M if P >= M.
// 2P + Y < 3M, so two stages always bring P back below M.
//
// Interface and timing are those of the Montgomery cores: `reset` high
// captures X, Y and M and clears P; the N clock cycles after it falls run
// the loop; `done` rises on the edge that ends the last iteration and `p`
// (the P register) is valid from then until the next reset.  Latency: N
// clock cycles.
//
// The loop (shift left, AND, adder, two compare/subtract/select stages)
// follows the published block diagram and algorithm.  The algorithm scans
// X from its most significant bit, and this design does the same; the
// register feeding the AND gate therefore shifts left.  Capturing Y and M
// and the reset-as-start protocol are this design's choices.
module interleaved_mm #(
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

  logic [N-1:0] x_sr, y_r, m_r, p_r;
  logic [N+1:0] acc, red1, red2;   // 2P + x_i*Y < 3M
  logic         sub1, sub2;
  logic         step;
  logic [$clog2(N+1)-1:0] idx;

  loop_ctrl #(.N(N)) u_ctrl (
    .clk  (clk),
    .reset(reset),
    .step (step),
    .idx  (idx),
    .done (done)
  );

  assign acc = {1'b0, p_r, 1'b0} + (x_sr[N-1] ? {2'b00, y_r} : '0);

  final_reduce #(.W(N + 2)) u_red1 (
    .p_in (acc),
    .m    ({2'b00, m_r}),
    .p_out(red1),
    .sub  (sub1)
  );

  final_reduce #(.W(N + 2)) u_red2 (
    .p_in (red1),
    .m    ({2'b00, m_r}),
    .p_out(red2),
    .sub  (sub2)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      x_sr <= x;
      y_r  <= y;
      m_r  <= m;
      p_r  <= '0;
    end else if (step) begin
      x_sr <= x_sr << 1;
      p_r  <= red2[N-1:0];
    end
  end

  assign p = p_r;

  // done marks exactly N completed iterations.
  a_count : assert property (@(posedge clk) disable iff (reset) done |-> idx == ($bits(idx))'(N));

  // With Y < M the two subtraction stages always leave P below M.
  a_reduced : assert property (@(posedge clk) disable iff (reset)
                               (step && y_r < m_r) |-> red2 < {2'b00, m_r});

endmodule
