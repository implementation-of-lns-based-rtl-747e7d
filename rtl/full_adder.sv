// full_adder: one-bit full adder, sum = a ^ b ^ ci, carry = majority(a, b, ci).
// Purely combinational; one stage of the ripple-carry adders of the multiplier.
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
