// Shared widths, types and helpers of the 3D ultrasound beamforming accelerator.
//
// The accelerator turns the echo samples of 1024 receive channels into beamformed
// scanlines. Widths fixed by the design: 12-bit ADC samples, 4x linear interpolation
// (which adds exactly two fractional bits, giving 14-bit interpolated samples) and a
// 14-bit fixed-point beam sum. The delay generator works on a 16.16 fixed-point
// sample position; its per-section increments carry an extra section-specific number
// of fractional bits (the "shift" coefficient). These internal delay widths, the
// apodization weight format (unsigned Q1.7) and the coefficient numbering of the
// configuration bus are this implementation's own choices.
package sm3d_pkg;

  localparam int ADC_W    = 12;   // ADC sample width
  localparam int IS_W     = 14;   // interpolated sample: ADC_W + 2 fractional bits
  localparam int SUM_W    = 14;   // beam-sum width
  localparam int APOD_W   = 8;    // apodization weight, unsigned Q1.7
  localparam int APOD_ONE = 128;  // weight value meaning 1.0
  localparam int N_SECT   = 3;    // quadratic sections per scanline
  localparam int N_ZONE   = 3;    // apodization depth zones
  localparam int POS_FRAC = 16;   // fractional bits of the sample position
  localparam int IDX_W    = 16;   // integer sample index width (stream index)
  localparam int COEF_W   = 32;   // width of one configuration word
  localparam int FP_W     = 13;   // focal point counter (0 .. 4096)
  localparam int SL_W     = 4;    // scanline number inside one pass (0 .. 9)
  localparam int CFG_IDX_W = 5;   // coefficient number on the configuration bus

  // Coefficient numbers on the configuration bus (per sub-unit):
  //   0                : start offset (16.16 sample position of focal point 0)
  //   1 + 5*s + 0      : section s length in focal points
  //   1 + 5*s + 1      : section s initial increment D0
  //   1 + 5*s + 2      : section s first difference E0
  //   1 + 5*s + 3      : section s second difference F
  //   1 + 5*s + 4      : section s shift k (increments are in units of 2^-(16+k))
  //   16 + z           : apodization weight of depth zone z
  localparam int CFG_APOD0 = 16;

  typedef logic signed [ADC_W-1:0] adc_t;
  typedef logic signed [IS_W-1:0]  isamp_t;
  typedef logic signed [SUM_W-1:0] sum_t;
  typedef logic [APOD_W-1:0]       apod_t;

  typedef struct packed {
    logic [FP_W-1:0]          len;
    logic signed [COEF_W-1:0] d0;
    logic signed [COEF_W-1:0] e0;
    logic signed [COEF_W-1:0] f;
    logic [3:0]               shift;
  } sect_t;

  typedef struct packed {
    sect_t [N_SECT-1:0] sect;
    logic [COEF_W-1:0]  start;
  } dcoef_t;

  // Packet travelling along the reduce network: scanline, focal point, partial sum.
  typedef struct packed {
    logic [SL_W-1:0] sl;
    logic [FP_W-1:0] fp;
    sum_t            sum;
  } rpkt_t;

  // Saturating addition in the beam-sum width.
  function automatic sum_t sat_add(sum_t a, sum_t b);
    logic signed [SUM_W:0] s;
    s = {a[SUM_W-1], a} + {b[SUM_W-1], b};
    if (s > (2**(SUM_W-1) - 1))       return sum_t'(2**(SUM_W-1) - 1);
    else if (s < -(2**(SUM_W-1)))     return sum_t'(-(2**(SUM_W-1)));
    else                              return sum_t'(s);
  endfunction

endpackage
