// tb_approx_dadda_mult16: the 16x16 configuration of the approximate Dadda
// multiplier (N = 16, 16 approximate columns, error correction on, three
// reduction levels 16 -> 8 -> 4 -> 2). 480 operand pairs, corner cases
// first, are checked against products precomputed by a separate bit-level
// reference model of the same tree (one line per pair: a(16) b(16) p(32),
// hex). The build must have 7 correction gates (4 + 2 + 1 over the levels).
// Elaboration of this size takes about a minute.
module tb_approx_dadda_mult16;
  localparam int NV = 480;
  logic [63:0] vec [NV];
  logic [15:0] a, b;
  logic [31:0] p;
  logic        hit;
  int          checks = 0, failures = 0;
  logic        clk = 1'b0;

  approx_dadda_mult #(.N(16), .NA(16)) dut (.a, .b, .p, .ecm_hit(hit));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    $readmemh("tb/approx_mult16_vectors.hex", vec);
    checks++;
    if (dut.NECM != 7) begin
      failures++;
      $display("FAIL %0d correction gates, expected 7", dut.NECM);
    end
    for (int i = 0; i < NV; i++) begin
      {a, b} = vec[i][63:32];
      @(posedge clk);
      checks++;
      if (p !== vec[i][31:0]) begin
        failures++;
        $display("FAIL a=%0d b=%0d: got %0d expected %0d", a, b, p, vec[i][31:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
