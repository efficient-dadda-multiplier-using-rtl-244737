// half_adder: one-bit half adder, sum = a ^ b, carry = a & b.
// Used by the reduction tree where a column is only one bit too high.
// Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
