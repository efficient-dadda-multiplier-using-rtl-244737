// approx_compressor_42: approximate 4:2 compressor of the multiplier's low
// (approximate) columns.
//
// Four bits of equal weight q[0]..q[3] (called Q1..Q4) are reduced to a Sum of
// the same weight and a Carry of twice the weight. There is no carry-in and no
// carry-out, which is where the saving over an exact 4:2 compressor comes from.
// The function is the compressor's published truth table:
//   Carry = Q1 | Q2
//   Sum   = (Q1 ^ Q2) ? (Q3 & Q4) : (Q3 | Q4)
// Carry+Sum is exact for 12 of the 16 input patterns. It reads 2 for 0100 and
// 1000 (true value 1), 1 for 0011 (true value 2) and 3 for 1111 (true 4).
// The two low cases, 0011 and 1111, are the ones with Q3 = Q4 = 1. The
// error-correction AND gates of the multiplier detect them.
// The gate-level form (one select signal, one multiplexer) is this design's
// own; only the truth table is taken as given. Purely combinational.
module approx_compressor_42 (
  input  logic [3:0] q,      // q[0] = Q1 ... q[3] = Q4
  output logic       sum,
  output logic       carry
);
  logic sel;   // Q1 xor Q2: exactly one of the upper-pair bits is set

  assign sel   = q[0] ^ q[1];
  assign carry = q[0] | q[1];
  assign sum   = sel ? (q[2] & q[3]) : (q[2] | q[3]);
endmodule
