// Conditional subtraction of the modulus (comparator, subtractor and
// multiplexer).
//
// Returns p_in - m when p_in >= m and p_in otherwise, and reports on `sub`
// which of the two was chosen.  This is the reduction step that ends both
// Montgomery multipliers (their loop result lies in [0, 2M)) and that the
// interleaved multiplier uses twice per iteration.  Purely combinational;
// the comparator and the subtractor work on the full W bits.
module final_reduce #(
  parameter int unsigned W = 1025
) (
  input  logic [W-1:0] p_in,
  input  logic [W-1:0] m,
  output logic [W-1:0] p_out,
  output logic         sub
);

  logic [W-1:0] diff;

  always_comb begin
    sub   = (p_in >= m);
    diff  = p_in - m;
    p_out = sub ? diff : p_in;
  end

endmodule
