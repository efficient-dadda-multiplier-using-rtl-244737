// tb_approx_dadda_mult: checks the approximate 8x8 Dadda multiplier.
//
//  - default build (NA = 8, error correction on) and the same build without
//    error correction: 640 operand pairs, including the corner cases, against
//    products and correction flags precomputed by a separate bit-level
//    reference model of the same tree. The file holds one line per pair:
//    a(8) b(8) p_ecm(16) p_noecm(16) hit(4), in hex.
//  - the default build has exactly 2 + 1 = 3 correction gates;
//  - NA = 0 (no approximate columns): every operand pair gives a*b;
//  - NA = 0 with a constant correction term 0x0030: a*b + 0x30.
// Also reports the mean relative error of the default build over the vectors.
module tb_approx_dadda_mult;
  localparam int NV = 640;
  logic [51:0] vec [NV];
  logic [7:0]  a, b;
  logic [15:0] p, p_noecm, p_exact, p_corr;
  logic        hit, hit_noecm, hit_exact, hit_corr;
  int          checks = 0, failures = 0, hits = 0;
  real         red = 0.0;
  logic        clk = 1'b0;

  approx_dadda_mult                               dut       (.a, .b, .p(p),       .ecm_hit(hit));
  approx_dadda_mult #(.ECM(1'b0))                 dut_noecm (.a, .b, .p(p_noecm), .ecm_hit(hit_noecm));
  approx_dadda_mult #(.NA(0))                     dut_exact (.a, .b, .p(p_exact), .ecm_hit(hit_exact));
  approx_dadda_mult #(.NA(0), .CORR(64'h30))      dut_corr  (.a, .b, .p(p_corr),  .ecm_hit(hit_corr));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(input string what, input logic [31:0] got,
                                input logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d: got %0d expected %0d", what, a, b, got, want);
    end
  endfunction

  initial begin
    $readmemh("tb/approx_mult_vectors.hex", vec);
    check("correction gate count", dut.NECM, 3);
    check("correction gates without ECM", dut_noecm.NECM, 0);

    for (int i = 0; i < NV; i++) begin
      {a, b} = vec[i][51:36];
      @(posedge clk);
      check("approx+ECM",  p,         vec[i][35:20]);
      check("approx",      p_noecm,   vec[i][19:4]);
      check("ecm_hit",     hit,       vec[i][3:0]);
      check("ecm_hit off", hit_noecm, 0);
      if (hit) hits++;
      if (a != 0 && b != 0) red += ((int'(p) > int'(a) * int'(b)) ? real'(int'(p) - int'(a) * int'(b))
                                                               : real'(int'(a) * int'(b) - int'(p)))
                                   / real'(int'(a) * int'(b));
    end
    check("vectors firing the correction gates", 32'(hits > 0), 1);

    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a = x[7:0];
        b = y[7:0];
        @(posedge clk);
        check("exact", p_exact, x * y);
        check("exact ecm_hit", hit_exact, 0);
        if ((x + y) % 7 == 0) check("constant correction", p_corr, (x * y + 'h30) % 65536);
      end

    $display("default build: %0d of %0d vectors fire the correction, mean relative error %f %%",
             hits, NV, 100.0 * red / NV);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
