// Zonal dynamic apodization. The image depth is split into N_ZONE = 3 zones, each
// with its own apodization weight for this channel and scanline (3 constants per
// scanline instead of one per focal point). The zone of a focal point is found by
// comparing its number with two zone boundaries, and the sample is multiplied by
// the zone's weight (unsigned Q1.7, 128 = 1.0), shifted back and saturated to the
// interpolated-sample width. Purely combinational.
// The three zones follow the design; the boundary comparison, weight format and
// saturation are this implementation's choice.
module apod_zone
  import sm3d_pkg::*;
(
  input  logic [FP_W-1:0] fp,          // focal point number along the scanline
  input  logic [FP_W-1:0] zb1,         // first focal point of zone 1
  input  logic [FP_W-1:0] zb2,         // first focal point of zone 2
  input  apod_t           w [N_ZONE],  // weights of zones 0, 1, 2
  input  isamp_t          x,
  output isamp_t          y,
  output logic [1:0]      zone
);
  localparam int PW = IS_W + APOD_W + 1;
  logic signed [PW-1:0] prod, shifted;

  always_comb begin
    if (fp < zb1)      zone = 2'd0;
    else if (fp < zb2) zone = 2'd1;
    else               zone = 2'd2;
    prod    = PW'(x) * $signed({1'b0, w[zone]});
    shifted = prod >>> $clog2(APOD_ONE);
    if (shifted > PW'(2**(IS_W-1) - 1))       y = isamp_t'(2**(IS_W-1) - 1);
    else if (shifted < -PW'(2**(IS_W-1)))     y = isamp_t'(-(2**(IS_W-1)));
    else                                      y = isamp_t'(shifted);
  end
endmodule
