// Three modular multiplier IP cores and a modular exponentiator side by
// side.
//
// The faster Montgomery core (carry-save loop, X*Y*2^-N mod M), the
// standard Montgomery core (carry-propagate loop, X*Y*2^-N mod M) and the
// standard interleaved core (X*Y mod M) share only the clock.  Each has its
// own operand, modulus, reset, result and done pins, named with the
// prefixes fm_, sm_ and il_.  All three take N clock cycles per
// multiplication after their reset falls; see the core files for the
// protocol.  The exponentiator (prefix ex_) computes base^e mod n on two
// further faster Montgomery cores in (H + 2) * (N + 2) clock cycles.
// N defaults to the 1024-bit configuration of the published cores, and the
// exponent width H to N.
module modmul_top #(
  parameter int unsigned N = 1024,
  parameter int unsigned H = N
) (
  input  logic         clk,
  // faster Montgomery
  input  logic         fm_reset,
  input  logic [N-1:0] fm_x,
  input  logic [N-1:0] fm_y,
  input  logic [N-1:0] fm_m,
  output logic [N-1:0] fm_p,
  output logic         fm_done,
  // standard Montgomery
  input  logic         sm_reset,
  input  logic [N-1:0] sm_x,
  input  logic [N-1:0] sm_y,
  input  logic [N-1:0] sm_m,
  output logic [N-1:0] sm_p,
  output logic         sm_done,
  // standard interleaved
  input  logic         il_reset,
  input  logic [N-1:0] il_x,
  input  logic [N-1:0] il_y,
  input  logic [N-1:0] il_m,
  output logic [N-1:0] il_p,
  output logic         il_done,
  // right-to-left modular exponentiation
  input  logic         ex_reset,
  input  logic [N-1:0] ex_base,
  input  logic [H-1:0] ex_e,
  input  logic [N-1:0] ex_n,
  input  logic [N-1:0] ex_r2,
  output logic [N-1:0] ex_c,
  output logic         ex_done
);

  mont_fast #(.N(N)) u_fast (
    .clk(clk), .reset(fm_reset), .x(fm_x), .y(fm_y), .m(fm_m),
    .p(fm_p), .done(fm_done)
  );

  mont_std #(.N(N)) u_std (
    .clk(clk), .reset(sm_reset), .x(sm_x), .y(sm_y), .m(sm_m),
    .p(sm_p), .done(sm_done)
  );

  interleaved_mm #(.N(N)) u_il (
    .clk(clk), .reset(il_reset), .x(il_x), .y(il_y), .m(il_m),
    .p(il_p), .done(il_done)
  );

  modexp_rl #(.N(N), .H(H)) u_exp (
    .clk(clk), .reset(ex_reset), .base(ex_base), .e(ex_e), .n(ex_n),
    .r2(ex_r2), .c(ex_c), .done(ex_done)
  );

endmodule
