// Shared types of the modular multiplier cores and of the exponentiator.
//
// lut_sel_e names the four operands that the faster Montgomery core can add
// to its carry-save pair in one loop iteration (0, M, Y or Y+M).  The
// selection rule is Algorithm 3 of the faster Montgomery method; the
// encoding of the enum is a choice of this design.  lut_addr_t is the 4-bit
// table address {x_i, y_0, c_0, s_0}, the bit order printed beside the
// lookup table in the architecture drawing of that method.
package modmul_pkg;

  typedef enum logic [1:0] {
    SEL_ZERO = 2'd0,  // sum even, x_i = 0: add nothing
    SEL_M    = 2'd1,  // sum odd,  x_i = 0: add M to make it even
    SEL_Y    = 2'd2,  // x_i = 1 and S+C+Y already even: add Y
    SEL_YM   = 2'd3   // x_i = 1 and S+C+Y odd: add Y+M
  } lut_sel_e;

  typedef struct packed {
    logic x;   // current multiplier bit x_i
    logic y0;  // LSB of Y
    logic c0;  // LSB of the carry word C
    logic s0;  // LSB of the sum word S
  } lut_addr_t;

  // Table of Algorithm 3: which operand is added for a given address.
  function automatic lut_sel_e lut_select(lut_addr_t a);
    if (!a.x) return (a.s0 == a.c0) ? SEL_ZERO : SEL_M;
    else      return (a.s0 ^ a.c0 ^ a.y0) ? SEL_YM : SEL_Y;
  endfunction

  // Phases of the right-to-left modular exponentiation controller.
  typedef enum logic [1:0] {
    EX_CONV = 2'd0,  // take the base and 1 into the Montgomery domain
    EX_LOOP = 2'd1,  // one exponent bit per pass: multiply and square
    EX_OUT  = 2'd2,  // take the result out of the Montgomery domain
    EX_DONE = 2'd3   // result valid
  } ex_state_e;

endpackage
