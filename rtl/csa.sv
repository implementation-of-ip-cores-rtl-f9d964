// One-level carry-save adder.
//
// Adds three W-bit words and returns them as a redundant pair (sum, carry)
// with a + b + c == sum + carry.  It is a row of W full-adder cells with no
// connection between neighbouring cells, so its delay is one full-adder
// delay whatever W is: cell i takes a_i, b_i, c_i and gives sum_i and
// carry_{i+1}.  carry is one bit wider than the inputs and its bit 0 is
// always zero; a user that knows the total fits in W bits may drop the top
// bit.  Purely combinational.  The row of cells is the published structure
// of the carry-save adder; the W+1-bit carry port is this design's choice.
module csa #(
  parameter int unsigned W = 6
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W:0]   carry
);

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_cell
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (sum[i]),
      .co(carry[i+1])
    );
  end

endmodule
