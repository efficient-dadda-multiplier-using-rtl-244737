// tb_error_correction_module: the correction flag must be 1 exactly when both
// Q3 and Q4 are 1, i.e. for the compressor inputs 0011 and 1111 and for the
// harmless 0111 and 1011.
module tb_error_correction_module;
  logic q3, q4, err;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  error_correction_module dut (.q3(q3), .q4(q4), .err(err));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {q3, q4} = v[1:0];
      @(posedge clk);
      checks++;
      if (err !== (v == 3)) begin
        failures++;
        $display("FAIL q3=%0d q4=%0d err=%0d", q3, q4, err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
