// tb_final_adder: the ripple-carry final adder at its default width (16) and
// at width 5 must give (a + b) mod 2^W for corner cases, random operands
// and, at width 5, every operand pair.
module tb_final_adder;
  logic [15:0] a, b, s;
  logic [4:0]  a5, b5, s5;
  int          checks = 0, failures = 0;
  logic        clk = 1'b0;

  final_adder             dut   (.a(a),  .b(b),  .s(s));
  final_adder #(.W(5))    dut5  (.a(a5), .b(b5), .s(s5));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    logic [16:0] ref17;
    a = x;
    b = y;
    @(posedge clk);
    ref17 = {1'b0, x} + {1'b0, y};
    checks++;
    if (s !== ref17[15:0]) begin
      failures++;
      $display("FAIL %h + %h = %h, expected %h", x, y, s, ref17[15:0]);
    end
  endtask

  initial begin
    check16(16'h0000, 16'h0000);
    check16(16'hffff, 16'h0001);
    check16(16'h7fff, 16'h7fff);
    check16(16'hffff, 16'hffff);
    check16(16'haaaa, 16'h5555);
    for (int i = 0; i < 5000; i++) check16(16'($urandom), 16'($urandom));
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++) begin
        a5 = x[4:0];
        b5 = y[4:0];
        @(posedge clk);
        checks++;
        if (s5 !== 5'((x + y) % 32)) begin
          failures++;
          $display("FAIL W=5 %0d + %0d = %0d", x, y, s5);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
