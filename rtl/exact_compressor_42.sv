// exact_compressor_42: exact 4:2 compressor of the multiplier's high columns.
//
// x[0]+x[1]+x[2]+x[3]+cin = sum + 2*(carry + cout). It is built from two full
// adders in the usual way: the first adds x[0..2] and gives cout; the second
// adds that sum, x[3] and cin and gives sum and carry. cout does not depend on
// cin, so chains of these compressors along a level do not ripple. cin is fed
// by the cout of the compressor one column lower, by an error-correction term,
// or by 0. Only the function is given for this part; the two-full-adder
// structure is the standard one. Purely combinational.
module exact_compressor_42 (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);
  logic s1;

  full_adder u_fa1 (.a(x[0]), .b(x[1]), .c(x[2]), .sum(s1),  .carry(cout));
  full_adder u_fa2 (.a(s1),   .b(x[3]), .c(cin),  .sum(sum), .carry(carry));
endmodule
