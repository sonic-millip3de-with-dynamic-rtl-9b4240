// Iterative delay-index generator for one scanline in one channel.
//
// Instead of a table of 4096 delays per scanline, the advance of the receive-sample
// position from one focal point to the next is approximated piece-wise by quadratics
// (N_SECT = 3 sections). Each section has five coefficients (length, D0, E0, F,
// shift k) and the scanline has one start offset: 16 numbers in all. Inside section
// s, the j-th step adds D_j / 2^(16+k) samples to the position, where
//   D_0 = D0,  D_{j+1} = D_j + E_j,  E_0 = E0,  E_{j+1} = E_j + F,
// so D_j = D0 + j*E0 + F*j*(j-1)/2 is quadratic in j and only adds (plus one
// arithmetic right shift by k) are needed. After `len` steps the next section's
// D0/E0 are loaded; the last section runs until the end of the scanline.
// The position is an unsigned 16.16 fixed-point sample index; idx is its integer
// part, the stream index of the interpolated sample nearest the focal point
// (truncation, so a start offset of n+0.5 rounds to nearest).
//
// Interface: start loads the first section and the start offset (focal point 0);
// step advances to the next focal point; both take effect at the next clock edge.
// The meaning given to the five per-section coefficients and all widths are this
// implementation's choice; the section count and coefficient count follow the design.
module delay_iter
  import sm3d_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  dcoef_t           coef,
  input  logic             start,
  input  logic             step,
  output logic [IDX_W-1:0] idx,
  output logic [FP_W-1:0]  fp,
  output logic [1:0]       sect
);
  logic [COEF_W-1:0]        pos;
  logic signed [COEF_W-1:0] d, e;
  logic [FP_W-1:0]          cnt;      // steps taken inside the current section
  logic signed [COEF_W-1:0] inc;

  assign idx = pos[POS_FRAC +: IDX_W];
  assign inc = d >>> coef.sect[sect].shift;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos  <= '0;
      d    <= '0;
      e    <= '0;
      cnt  <= '0;
      fp   <= '0;
      sect <= '0;
    end else if (start) begin
      pos  <= coef.start;
      d    <= coef.sect[0].d0;
      e    <= coef.sect[0].e0;
      cnt  <= '0;
      fp   <= '0;
      sect <= '0;
    end else if (step) begin
      pos <= pos + COEF_W'(inc);
      fp  <= fp + 1'b1;
      if (sect < 2'(N_SECT - 1) && cnt + 1'b1 == coef.sect[sect].len) begin
        sect <= sect + 1'b1;
        d    <= coef.sect[sect + 1'b1].d0;
        e    <= coef.sect[sect + 1'b1].e0;
        cnt  <= '0;
      end else begin
        d   <= d + e;
        e   <= e + coef.sect[sect].f;
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
