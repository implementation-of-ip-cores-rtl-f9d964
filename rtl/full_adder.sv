// Full-adder cell.
//
// Adds three bits: s = a ^ b ^ ci and co = a&b | a&ci | b&ci, so that
// a + b + ci == 2*co + s.  It is the building block of the carry-save adder
// row (csa.sv); in a carry-save adder the third input is a bit of a third
// operand rather than a neighbour's carry.  Purely combinational.  The cell
// equations are the standard ones given for the full adder; nothing here is
// a design choice.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end

endmodule
