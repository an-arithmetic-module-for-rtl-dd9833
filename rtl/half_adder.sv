// One-bit half adder, a (2,2) counter: s + 2*c = a + b. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  always_comb begin
    s = a ^ b;
    c = a & b;
  end
endmodule
