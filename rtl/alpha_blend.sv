// alpha_blend: one-pixel-per-clock alpha blending of two 8-bit grayscale
// images on two approximate Dadda multipliers. This is the top of the design.
//
//   pix = round( (alpha*fg + (255-alpha)*bg) / 255 )
//
// alpha = 0 shows only the background and alpha = 255 only the foreground.
// The two products come from approx_dadda_mult instances (8x8, approximate
// region of NA columns, error correction ECM). A small adder adds them. The
// rounded division by 255 is done without a divider, as
//   y = x + 128,  pix = (y + (y >> 8)) >> 8,
// which is exact for every sum x an exact multiplier can produce. The
// approximate multipliers can read high, so the result is clipped to 255;
// sat_o marks a clipped pixel.
//
// Interface and timing: in_valid/alpha/fg/bg are sampled on the rising edge
// of clk. out_valid/pix/sat_o/ecm_o appear one clock later, so the latency is
// 1 cycle and the rate is one pixel per cycle with no stall. ecm_o shows that
// an error-correction gate fired in either multiplier for that pixel; it
// feeds nothing. rst_n is an active-low synchronous reset that clears
// out_valid and the output registers.
//
// The blending formula and the 8-bit grayscale pixels follow the published
// application. The fixed-point form of alpha (0..255 for 0..1), the rounding,
// the clipping and the output register are this design's own choices.
module alpha_blend #(
  parameter int unsigned NA  = 8,     // approximate columns in each multiplier
  parameter bit          ECM = 1'b1   // error correction on/off
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] alpha,
  input  logic [7:0] fg,
  input  logic [7:0] bg,
  output logic       out_valid,
  output logic [7:0] pix,
  output logic       sat_o,
  output logic       ecm_o
);
  logic [15:0] p_fg, p_bg;
  logic        hit_fg, hit_bg;
  logic [7:0]  alpha_n;
  logic [16:0] x;
  logic [17:0] y;
  logic [9:0]  q;
  logic        sat;
  logic [7:0]  pix_d;

  assign alpha_n = 8'd255 - alpha;

  approx_dadda_mult #(.N(8), .NA(NA), .ECM(ECM)) u_mul_fg (
    .a(alpha), .b(fg), .p(p_fg), .ecm_hit(hit_fg)
  );
  approx_dadda_mult #(.N(8), .NA(NA), .ECM(ECM)) u_mul_bg (
    .a(alpha_n), .b(bg), .p(p_bg), .ecm_hit(hit_bg)
  );

  always_comb begin
    x     = {1'b0, p_fg} + {1'b0, p_bg};
    y     = {1'b0, x} + 18'd128;
    q     = 10'((y + (y >> 8)) >> 8);   // at most 515: fits 10 bits
    sat   = (q > 10'd255);
    pix_d = sat ? 8'd255 : q[7:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      pix       <= '0;
      sat_o     <= 1'b0;
      ecm_o     <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        pix   <= pix_d;
        sat_o <= sat;
        ecm_o <= hit_fg | hit_bg;
      end
    end
  end
endmodule
