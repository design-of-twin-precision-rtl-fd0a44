// full_adder -- one-bit (3,2) counter: sum = a ^ b ^ ci, co = majority(a, b, ci).
// The basic cell of the Baugh-Wooley reduction array and of its final
// ripple-carry adder. Purely combinational.
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
