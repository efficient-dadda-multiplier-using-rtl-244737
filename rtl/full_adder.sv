// full_adder: one-bit full adder (3:2 counter), a + b + c = sum + 2*carry.
// Building block of the exact 4:2 compressor, of the reduction tree and of
// the ripple-carry final adder. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b ^ c;
  assign carry = (a & b) | (a & c) | (b & c);
endmodule
