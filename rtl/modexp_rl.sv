// Right-to-left binary modular exponentiation on two faster Montgomery
// multipliers.
//
// Computes c = base^e mod n for an odd modulus n > 1 and base < n.  The
// exponent is scanned from its least significant bit.  A running power P
// (base, base^2, base^4, ...) is squared in every pass, and the result C is
// multiplied by P in the passes where the exponent bit is 1.  The two
// products of a pass do not depend on each other, so they run at the same
// time on two mont_fast cores: a multiplier (C * P) and a squarer (P * P).
// All values are kept in the Montgomery domain:
//   conversion : C := Mont(1, r2) = 2^N mod n,  P := Mont(base, r2)
//   pass i     : if e_i = 1 then C := Mont(C, P);  P := Mont(P, P)
//   output     : c := Mont(C, 1)
// where r2 = 2^2N mod n is supplied by the user, as the Montgomery cores
// need it for any conversion.  In passes where e_i = 0 the multiplier
// still runs and its product is discarded.
//
// Interface: holding `reset` high for at least one clock captures base,
// e, n and r2 and starts a new exponentiation when it falls.  `done` rises
// when c is valid and stays high until the next reset.  Timing: H + 2
// Montgomery passes of N + 2 clock cycles each (one cycle to load the
// cores, N loop iterations, one cycle to take the products), so
// (H + 2) * (N + 2) clock cycles from the fall of reset to done.
//
// The right-to-left method and the idea of a separate multiplier and
// squarer come from the modular exponentiation part of the published work,
// where building an exponentiator on the multiplier cores is proposed as
// the next step.  The use of the faster Montgomery core, the domain
// conversion sequence, the user-supplied r2 and the controller are this
// design's choices.
module modexp_rl
  import modmul_pkg::*;
#(
  parameter int unsigned N = 1024,
  parameter int unsigned H = N
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [N-1:0] base,
  input  logic [H-1:0] e,
  input  logic [N-1:0] n,
  input  logic [N-1:0] r2,
  output logic [N-1:0] c,
  output logic         done
);

  localparam int unsigned IW = $clog2(H + 1);
  localparam logic [IW-1:0] LASTBIT = IW'(H - 1);
  localparam logic [N-1:0]  ONE = N'(1);

  ex_state_e    state;
  logic         kick;          // load the two cores this cycle
  logic [IW-1:0] bit_i;        // exponent bits consumed
  logic [H-1:0] e_sr;
  logic [N-1:0] base_r, n_r, r2_r, c_r, p_r;

  logic [N-1:0] mul_x, mul_y, sqr_x, sqr_y, mul_p, sqr_p;
  logic         core_rst, mul_done, sqr_done;

  assign core_rst = reset || kick;

  // Operand selection for the two cores in each phase.
  always_comb begin
    unique case (state)
      EX_CONV: begin mul_x = ONE; mul_y = r2_r; sqr_x = base_r; sqr_y = r2_r; end
      EX_LOOP: begin mul_x = c_r; mul_y = p_r;  sqr_x = p_r;    sqr_y = p_r;  end
      default: begin mul_x = c_r; mul_y = ONE;  sqr_x = p_r;    sqr_y = p_r;  end
    endcase
  end

  mont_fast #(.N(N)) u_mul (
    .clk(clk), .reset(core_rst), .x(mul_x), .y(mul_y), .m(n_r),
    .p(mul_p), .done(mul_done)
  );

  mont_fast #(.N(N)) u_sqr (
    .clk(clk), .reset(core_rst), .x(sqr_x), .y(sqr_y), .m(n_r),
    .p(sqr_p), .done(sqr_done)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      state  <= EX_CONV;
      kick   <= 1'b1;
      bit_i  <= '0;
      e_sr   <= e;
      base_r <= base;
      n_r    <= n;
      r2_r   <= r2;
      c_r    <= '0;
      p_r    <= '0;
    end else if (kick) begin
      kick <= 1'b0;
    end else if (mul_done && sqr_done) begin
      unique case (state)
        EX_CONV: begin
          c_r   <= mul_p;
          p_r   <= sqr_p;
          state <= EX_LOOP;
          kick  <= 1'b1;
        end
        EX_LOOP: begin
          if (e_sr[0]) c_r <= mul_p;
          p_r   <= sqr_p;
          e_sr  <= e_sr >> 1;
          bit_i <= bit_i + 1'b1;
          if (bit_i == LASTBIT) state <= EX_OUT;
          kick  <= 1'b1;
        end
        EX_OUT: begin
          c_r   <= mul_p;
          state <= EX_DONE;
        end
        default: ;
      endcase
    end
  end

  assign c    = c_r;
  assign done = (state == EX_DONE);

  // Both cores are always started together, so they finish together.
  a_lockstep : assert property (@(posedge clk) disable iff (reset)
                                mul_done == sqr_done);

endmodule
