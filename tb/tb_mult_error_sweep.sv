// tb_mult_error_sweep: accuracy of the 8x8 multiplier as the approximate
// region grows, with and without error correction. Six builds
// (NA = 4, 6, 8, each with ECM = 0 and 1) see all 65,536 operand pairs.
// For each build the testbench reports:
//   - ER: the share of products that are wrong;
//   - MRED: the mean relative error distance;
//   - the mean signed error;
//   - NMED: the mean absolute error divided by 255*255.
// It compares three exact integer totals per build with a separate
// bit-level reference model: the signed error sum, the number of wrong
// products and the absolute error sum.
module tb_mult_error_sweep;
  localparam int NB = 6;
  localparam int NAS  [NB] = '{4, 4, 6, 6, 8, 8};
  localparam bit ECMS [NB] = '{0, 1, 0, 1, 0, 1};
  // reference totals: signed error sum, wrong products, absolute error sum
  localparam longint REF_SUM [NB] = '{90112, 155648, 950272, 1474560, 6692864, 10268672};
  localparam longint REF_ER  [NB] = '{16384, 17920, 42240, 44336, 57032, 57896};
  localparam longint REF_ABS [NB] = '{131072, 155648, 1251840, 1519104, 8834768, 10513584};

  logic [7:0]  a, b;
  logic [15:0] p [NB];
  logic        hit [NB];
  longint      esum [NB], ecnt [NB], eabs [NB];
  real         red [NB];
  int          checks = 0, failures = 0;
  logic        clk = 1'b0;

  for (genvar g = 0; g < NB; g++) begin : g_build
    approx_dadda_mult #(.NA(NAS[g]), .ECM(ECMS[g])) dut (.a, .b, .p(p[g]), .ecm_hit(hit[g]));
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (70000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < NB; g++) begin
      esum[g] = 0;
      ecnt[g] = 0;
      eabs[g] = 0;
      red[g]  = 0.0;
    end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a = x[7:0];
        b = y[7:0];
        @(posedge clk);
        for (int g = 0; g < NB; g++) begin
          longint d;
          d = longint'(p[g]) - longint'(x * y);
          esum[g] += d;
          if (d != 0) ecnt[g]++;
          eabs[g] += (d < 0) ? -d : d;
          if (x * y != 0) red[g] += real'((d < 0) ? -d : d) / real'(x * y);
        end
      end
    for (int g = 0; g < NB; g++) begin
      $display("NA=%0d ECM=%0d: ER %6.2f %%  MRED %6.3f %%  mean error %8.2f  NMED %8.5f %%",
               NAS[g], ECMS[g], 100.0 * real'(ecnt[g]) / 65536.0, 100.0 * red[g] / 65025.0,
               real'(esum[g]) / 65536.0, 100.0 * real'(eabs[g]) / 65536.0 / 65025.0);
      checks += 3;
      if (esum[g] != REF_SUM[g] || ecnt[g] != REF_ER[g] || eabs[g] != REF_ABS[g]) begin
        failures++;
        $display("FAIL NA=%0d ECM=%0d: totals %0d/%0d/%0d expected %0d/%0d/%0d", NAS[g], ECMS[g],
                 esum[g], ecnt[g], eabs[g], REF_SUM[g], REF_ER[g], REF_ABS[g]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
