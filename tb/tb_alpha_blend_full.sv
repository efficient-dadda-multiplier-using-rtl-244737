// tb_alpha_blend_full: one complete operation of the blending top exactly as
// built, with no parameter changed: one 256x256 image blend (alpha = 77)
// followed by short passes at alpha = 0 and 255 so clipping is reached.
// It is the single-instance counterpart of tb_alpha_blend.
//
// Blends two 256x256 grayscale images,
// one pixel per clock with an idle cycle after every 7th pixel. The
// foreground is a diagonal gradient. The background tiles a 16x8 block of
// sample pixel values over the image.
// Checks:
//  - every pixel equals the rounded, clipped blend of the
//    two products its multipliers produced (read through the hierarchy),
//    computed here with an integer division;
//  - out_valid follows in_valid by exactly one clock; one output per input;
//  - every mechanism happens at least once: correction gate firing, output
//    clipping, idle input cycles, reset.
// Reports MSE and PSNR of the blended pixels against exact arithmetic.
module tb_alpha_blend_full;
  localparam int IMG = 256;
  localparam int NALPHA = 3;
  localparam int ALPHAS [NALPHA] = '{77, 0, 255};

  // 16x8 block of sample pixel values used as the background tile
  localparam logic [7:0] TILE [16][8] = '{
    '{ 99, 202, 183,   4,   9,  83, 208,  81},
    '{124, 130, 253, 199, 131, 209, 239, 163},
    '{119, 201, 147,  35,  44,   0, 170,  64},
    '{123, 125,  38, 195,  26, 237, 251, 143},
    '{242, 250,  54,  24,  27,  32,  67, 146},
    '{107,  89,  63, 150, 110, 252,  77, 157},
    '{111,  71, 247,   5,  90, 177,  51,  56},
    '{197, 240, 204, 154, 160,  91, 133, 245},
    '{ 48, 173,  52,   7,  82, 106,  69, 188},
    '{  1, 212, 165,  18,  59, 203, 249, 182},
    '{103, 162, 229, 128, 214, 190,   2, 218},
    '{ 43, 175, 241, 226, 179,  57, 127,  33},
    '{254, 156, 113, 235,  41,  74,  80,  16},
    '{215, 164, 216,  39, 227,  76,  60, 255},
    '{171, 114,  49, 178,  47,  88, 159, 243},
    '{118, 192,  21, 117, 132, 207, 168, 210}};

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       in_valid = 1'b0;
  logic [7:0] alpha = '0, fg = '0, bg = '0;
  logic       out_valid, sat, ecm;
  logic [7:0] pix;

  int checks = 0, failures = 0;
  int n_ecm = 0, n_sat = 0, n_idle = 0, n_reset = 0, n_in = 0, n_out = 0;

  alpha_blend dut (
    .clk, .rst_n, .in_valid, .alpha, .fg, .bg,
    .out_valid, .pix, .sat_o(sat), .ecm_o(ecm)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NALPHA * IMG * IMG * 2 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int blend_ref(int a, int f, int b);
    int x = a * f + (255 - a) * b;
    return (2 * x + 255) / 510;
  endfunction

  // expected values of the pixel in flight (one-cycle latency)
  logic       exp_valid = 1'b0;
  int         exp_exact, exp_appr;
  logic       exp_sat;
  real        sq_err = 0.0;
  int         npix = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      // outputs of the previous input
      checks++;
      if (out_valid !== exp_valid) begin
        failures++;
        $display("FAIL out_valid=%0d expected %0d", out_valid, exp_valid);
      end
      if (exp_valid) begin
        n_out++;
        checks += 1;
        if (int'(pix) != exp_appr || sat !== exp_sat) begin
          failures++;
          $display("FAIL approx pixel %0d (sat %0d) expected %0d (sat %0d)",
                   pix, sat, exp_appr, exp_sat);
        end
        if (ecm) n_ecm++;
        if (sat) n_sat++;
        sq_err += real'((int'(pix) - exp_exact) * (int'(pix) - exp_exact));
        npix++;
      end
      // what the inputs of this edge must produce
      exp_valid = in_valid;
      if (in_valid) begin
        int x, q;
        n_in++;
        exp_exact = blend_ref(int'(alpha), int'(fg), int'(bg));
        x = int'(dut.p_fg) + int'(dut.p_bg);
        q = (2 * x + 255) / 510;
        exp_sat  = (q > 255);
        exp_appr = exp_sat ? 255 : q;
      end else n_idle++;
    end else begin
      exp_valid = 1'b0;
      n_reset++;
    end
  end

  initial begin
    real mse, psnr;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < NALPHA; k++) begin
      for (int r = 0; r < ((k == 0) ? IMG : 32); r++)
        for (int c = 0; c < IMG; c++) begin
          alpha    = 8'(ALPHAS[k]);
          fg       = 8'((r + c) / 2);
          bg       = TILE[r % 16][c % 8];
          in_valid = 1'b1;
          @(posedge clk);
          #1;
          if (c % 7 == 6) begin
            in_valid = 1'b0;
            @(posedge clk);
            #1;
          end
        end
    end
    in_valid = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (n_in != IMG * IMG + 2 * 32 * IMG || n_out != n_in) begin
      failures++;
      $display("FAIL %0d inputs, %0d outputs", n_in, n_out);
    end
    mse  = sq_err / npix;
    psnr = (mse > 0.0) ? 10.0 * $log10(255.0 * 255.0 / mse) : 99.0;
    $display("%0d pixels blended: MSE %f, PSNR %f dB against exact multipliers", npix, mse, psnr);
    $display("mechanisms: correction fired %0d, clipped %0d, idle cycles %0d, reset cycles %0d",
             n_ecm, n_sat, n_idle, n_reset);
    checks += 4;
    if (n_ecm == 0)   begin failures++; $display("FAIL correction never fired"); end
    if (n_sat == 0)   begin failures++; $display("FAIL clipping never happened"); end
    if (n_idle == 0)  begin failures++; $display("FAIL no idle cycle"); end
    if (n_reset == 0) begin failures++; $display("FAIL no reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
