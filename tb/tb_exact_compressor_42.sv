// tb_exact_compressor_42: exhaustive check of the exact 4:2 compressor:
// for all 32 input patterns x0+x1+x2+x3+cin must equal sum + 2*(carry+cout),
// and cout must not depend on cin.
module tb_exact_compressor_42;
  logic [3:0] x;
  logic       cin, sum, carry, cout, cout0;
  int         checks = 0, failures = 0;
  logic       clk = 1'b0;

  exact_compressor_42 dut (.x(x), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      for (int c = 0; c < 2; c++) begin
        x   = v[3:0];
        cin = c[0];
        @(posedge clk);
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout)) != v[0] + v[1] + v[2] + v[3] + c) begin
          failures++;
          $display("FAIL x=%04b cin=%0d: sum=%0d carry=%0d cout=%0d", x, cin, sum, carry, cout);
        end
        if (c == 0) cout0 = cout;
        else begin
          checks++;
          if (cout !== cout0) begin
            failures++;
            $display("FAIL x=%04b: cout depends on cin", x);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
