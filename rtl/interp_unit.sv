// Interpolation unit: streams the channel's stored samples out of its SRAM as a 4x
// linearly interpolated sequence. For each stored pair x[p], x[p+1] it emits
//   4*x[p], 3*x[p]+x[p+1], 2*x[p]+2*x[p+1], x[p]+3*x[p+1]
// i.e. the interpolated values in units of 1/4 of an ADC step (two extra fractional
// bits, 14-bit result, computed with shifts and adds only). The sample after the last
// stored one is taken as zero. Output index s_idx = 4*p + phase runs 0 .. 4*N_SAMP-1.
//
// Interface: a start pulse restarts the stream at sample 0; the stream is a
// valid/ready handshake (one value per cycle when s_ready stays high); s_done is high
// from the acceptance of the last value until the next start. The SRAM is read one
// word every four accepted outputs, with its one-cycle read latency hidden behind the
// current pair. The linear 4x interpolation follows the design; the exact arithmetic
// (exact quarter-step values) and the handshake are this implementation's choice.
module interp_unit
  import sm3d_pkg::*;
#(
  parameter int N_SAMP = 4096,
  localparam int AW    = $clog2(N_SAMP)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  // SRAM read port
  output logic             re,
  output logic [AW-1:0]    raddr,
  input  adc_t             rdata,
  // interpolated stream
  output logic             s_valid,
  output logic [IDX_W-1:0] s_idx,
  output isamp_t           s_data,
  input  logic             s_ready,
  output logic             s_done
);
  typedef enum logic [1:0] {IDLE, LOAD0, LOAD1, RUN} state_t;
  state_t      state;
  logic [AW:0] p;         // index of x0
  logic [1:0]  ph;        // interpolation phase
  adc_t        x0, x1;
  logic        fire;

  assign x1      = (p + 1 < (AW+1)'(N_SAMP)) ? rdata : adc_t'(0);
  assign s_valid = (state == RUN);
  assign fire    = s_valid && s_ready;
  assign s_idx   = IDX_W'({p, ph});

  // (4-ph)*x0 + ph*x1 in quarter steps
  always_comb begin
    logic signed [IS_W-1:0] a, b;
    a = IS_W'(x0);
    b = IS_W'(x1);
    unique case (ph)
      2'd0: s_data = a <<< 2;
      2'd1: s_data = (a <<< 1) + a + b;
      2'd2: s_data = (a <<< 1) + (b <<< 1);
      default: s_data = a + (b <<< 1) + b;
    endcase
  end

  always_comb begin
    re    = 1'b0;
    raddr = '0;
    unique case (state)
      LOAD0: begin re = 1'b1; raddr = '0; end
      LOAD1: begin re = (N_SAMP > 1); raddr = AW'(1); end
      RUN:   if (fire && ph == 2'd3 && (p + 2 < (AW+1)'(N_SAMP))) begin
               re = 1'b1; raddr = AW'(p + 2);
             end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      p      <= '0;
      ph     <= '0;
      x0     <= '0;
      s_done <= 1'b0;
    end else if (start) begin
      state  <= LOAD0;
      p      <= '0;
      ph     <= '0;
      s_done <= 1'b0;
    end else begin
      unique case (state)
        LOAD0: state <= LOAD1;
        LOAD1: begin x0 <= rdata; state <= RUN; end
        RUN: if (fire) begin
          ph <= ph + 1'b1;
          if (ph == 2'd3) begin
            x0 <= x1;
            p  <= p + 1'b1;
            if (p == (AW+1)'(N_SAMP - 1)) begin
              state  <= IDLE;
              s_done <= 1'b1;
            end
          end
        end
        default: ;
      endcase
    end
  end
endmodule
