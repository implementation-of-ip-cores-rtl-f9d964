// Faster Montgomery modular multiplier (radix 2, carry-save, one CSA).
//
// Computes p = X * Y * 2^-N mod M for an odd modulus M and 0 <= X, Y < M.
// The intermediate result is kept as a carry-save pair (S, C), so a loop
// iteration has no carry propagation.  In each iteration exactly one of
// four operands is added, chosen from a small table addressed by
// {x_i, y_0, c_0, s_0}:
//   x_i = 0, s_0 == c_0          -> 0
//   x_i = 0, s_0 != c_0          -> M
//   x_i = 1, s_0 ^ c_0 ^ y_0 = 0 -> Y
//   x_i = 1, s_0 ^ c_0 ^ y_0 = 1 -> Y + M
// so that S + C + I is always even.  One carry-save adder then forms the
// new pair and both words are halved by wiring.  Y + M is formed once,
// while the operands are loaded.  After N iterations S + C < 2M; a
// carry-propagate adder, a comparator, a subtractor and a multiplexer at
// the output give the reduced result.
//
// Interface and timing are those of mont_std: `reset` high captures X, Y,
// M (and Y + M) and clears S and C; the N clock cycles after it falls run
// the loop; `done` rises on the edge that ends the last iteration and `p`
// is valid from then until the next reset.  Latency: N clock cycles.
//
// The selection table, the single CSA, the precomputed Y + M and the
// output adder/comparator/subtractor/multiplexer follow the published
// algorithm and block diagram.  Registering Y + M at load time (so the
// adder is off the loop path), the word widths (N + 1 bits for S and C)
// and the reset-as-start protocol are this design's choices.
module mont_fast
  import modmul_pkg::*;
#(
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
  logic [N:0]   ym_r;          // precomputed Y + M
  logic [N:0]   s_r, c_r;      // carry-save pair, S + C < Y + M
  logic [N:0]   opnd;          // operand I chosen by the table
  lut_addr_t    addr;
  lut_sel_e     sel;
  logic [N+1:0] csa_sum;
  logic [N+2:0] csa_carry;
  logic         step;
  logic [$clog2(N+1)-1:0] idx;
  logic [N:0]   p_sum, p_red;

  loop_ctrl #(.N(N)) u_ctrl (
    .clk  (clk),
    .reset(reset),
    .step (step),
    .idx  (idx),
    .done (done)
  );

  // Lookup table: address and operand multiplexer.
  always_comb begin
    addr = '{x: x_sr[0], y0: y_r[0], c0: c_r[0], s0: s_r[0]};
    sel  = lut_select(addr);
    unique case (sel)
      SEL_ZERO: opnd = '0;
      SEL_M:    opnd = {1'b0, m_r};
      SEL_Y:    opnd = {1'b0, y_r};
      SEL_YM:   opnd = ym_r;
    endcase
  end

  csa #(.W(N + 2)) u_csa (
    .a    ({1'b0, s_r}),
    .b    ({1'b0, c_r}),
    .c    ({1'b0, opnd}),
    .sum  (csa_sum),
    .carry(csa_carry)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      x_sr <= x;
      y_r  <= y;
      m_r  <= m;
      ym_r <= {1'b0, y} + {1'b0, m};
      s_r  <= '0;
      c_r  <= '0;
    end else if (step) begin
      x_sr <= x_sr >> 1;
      // S + C + I is even and the carry word is even, so both words are
      // even and each can be halved on its own.
      s_r  <= csa_sum[N+1:1];
      c_r  <= csa_carry[N+1:1];
    end
  end

  // Output stage: one carry-propagate addition, then conditional subtract.
  assign p_sum = s_r + c_r;

  final_reduce #(.W(N + 1)) u_reduce (
    .p_in (p_sum),
    .m    ({1'b0, m_r}),
    .p_out(p_red),
    .sub  ()
  );

  assign p = p_red[N-1:0];

  // done marks exactly N completed iterations.
  a_count : assert property (@(posedge clk) disable iff (reset) done |-> idx == ($bits(idx))'(N));

  // The table choice keeps S + C + I even, so the CSA sum word is even.
  a_even : assert property (@(posedge clk) disable iff (reset)
                            step |-> !csa_sum[0]);

endmodule
