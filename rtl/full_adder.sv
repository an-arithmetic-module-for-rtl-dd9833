// One-bit full adder, a (3,2) counter: s + 2*c = a + b + ci. Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic c
);
  always_comb begin
    s = a ^ b ^ ci;
    c = (a & b) | (a & ci) | (b & ci);
  end
endmodule
