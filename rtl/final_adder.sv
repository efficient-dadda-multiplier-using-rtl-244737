// final_adder: final accumulation stage of the multiplier.
//
// Adds the two rows left by the compressor tree, a + b, with a ripple chain of
// full adders (the structure whose fa cells appear on the multiplier's critical
// path). The result is W bits wide; the carry out of the top bit is dropped,
// because the product of two N-bit numbers fits in 2N bits. Purely
// combinational; the delay grows linearly with W.
module final_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);
  logic [W-1:0] c;   // c[i] is the carry into bit i

  assign c[0] = 1'b0;
  for (genvar i = 0; i < W - 1; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .c(c[i]), .sum(s[i]), .carry(c[i+1]));
  end
  // top bit: its carry out would be bit W, which is dropped
  assign s[W-1] = a[W-1] ^ b[W-1] ^ c[W-1];
endmodule
