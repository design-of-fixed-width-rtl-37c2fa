// half_adder: one-bit half adder.
//
// s = a xor b, c = a and b. Pure combinational logic with no clock. It is
// the basic cell of the carry-save tree. Two of them and an OR of their
// carries make a full adder.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
