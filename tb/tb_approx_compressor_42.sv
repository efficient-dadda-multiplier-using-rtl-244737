// tb_approx_compressor_42: exhaustive check of the approximate 4:2 compressor
// against its truth table, written out here row by row as {Carry, Sum}.
// Also checks that the arithmetic error of every row is the expected one.
module tb_approx_compressor_42;
  logic [3:0] q;
  logic       sum, carry;
  int         checks = 0, failures = 0;
  logic       clk = 1'b0;

  approx_compressor_42 dut (.q(q), .sum(sum), .carry(carry));

  // {Carry,Sum} for Q1Q2Q3Q4 = 0000 ... 1111 (Q1 is the MSB of the index)
  localparam logic [1:0] TT [16] = '{
    2'b00, 2'b01, 2'b01, 2'b01, 2'b10, 2'b10, 2'b10, 2'b11,
    2'b10, 2'b10, 2'b10, 2'b11, 2'b10, 2'b11, 2'b11, 2'b11 };

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 16; r++) begin
      int ones, val;
      // index r = Q1Q2Q3Q4; port q[0] is Q1
      q = {r[0], r[1], r[2], r[3]};
      @(posedge clk);
      checks++;
      if ({carry, sum} !== TT[r]) begin
        failures++;
        $display("FAIL row %04b: carry/sum=%b%b expected %b", r[3:0], carry, sum, TT[r]);
      end
      ones = r[0] + r[1] + r[2] + r[3];
      val  = 2 * carry + sum;
      checks++;
      // error only for 0011 and 1111 (-1) and 0100, 1000 (+1)
      if (val - ones != ((r == 3 || r == 15) ? -1 : (r == 4 || r == 8) ? 1 : 0)) begin
        failures++;
        $display("FAIL row %04b: value %0d for %0d ones", r[3:0], val, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
