// full_adder: one stage of the ripple carry adder.
//
// Adds the two operand bits a and b and the incoming carry ci, giving the sum
// bit s and the outgoing carry co. Purely combinational, no clock. The gate
// form (two XORs for the sum, majority for the carry) is the textbook one; the
// description only says the adder is built from full adders.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  logic p;

  always_comb begin
    p  = a ^ b;
    s  = p ^ ci;
    co = (a & b) | (p & ci);
  end

endmodule
