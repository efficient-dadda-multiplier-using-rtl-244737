// error_correction_module: error-recovery term of one approximate compressor.
//
// The approximate 4:2 compressor reads one unit too low for the inputs 0011
// and 1111, which are exactly the patterns with Q3 = Q4 = 1. This module
// flags that condition with a single AND gate: err = Q3 & Q4. The multiplier
// puts one such module on each approximate compressor in the most significant
// column of the approximate region. The flag drives the carry-in of an exact
// 4:2 compressor of the same reduction level. Purely combinational.
module error_correction_module (
  input  logic q3,
  input  logic q4,
  output logic err
);
  assign err = q3 & q4;
endmodule
