// full_adder: one-bit full adder (3:2 counter) built from two half adders.
//
// The first half adder adds a and b. The second adds that partial sum to ci.
// The carry out is set when either half adder produces a carry. Pure
// combinational logic. This is the cell the carry-save tree is built from.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic s1, c1, c2;

  half_adder h1 (.a(a),  .b(b),  .s(s1), .c(c1));
  half_adder h2 (.a(s1), .b(ci), .s(s),  .c(c2));

  assign co = c1 | c2;
endmodule
