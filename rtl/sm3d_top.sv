// Top level of the 3D ultrasound synthetic-aperture beamformer.
//
// A SUB x SUB (32x32 = 1024) receive sub-aperture slides over a 120x88 transducer
// array, 8 elements per firing (firing_sequencer). Transducers are banked so that one
// transducer per bank receives in any window; bank_select drives each bank's analog
// multiplexer. Each of the N_CH = SUB*SUB banks has an ADC (outside this RTL: its
// 12-bit samples arrive on adc_sample) and a beamsum_channel that stores the
// samples, interpolates them 4x, picks and apodizes the sample of each focal point on
// N_SUB = 10 scanlines at once, and adds it into packets flowing down a chain of
// N_CH pipelined summing stages. The chain's head takes the previously accumulated
// image from memory and its tail returns the updated image (the memory-side
// processor and DRAM are outside this RTL).
//
// Operation per firing: frame_start/fire_next step the sequencer; rx_start clears
// the shared SRAM write address and each adc_valid writes one sample per channel
// (N_SAMP per firing); cfg_* loads delay and apodization coefficients (per channel or
// broadcast); pass_start streams the stored samples through all channels while the
// head feeds one packet per (scanline, focal point) and the tail returns them summed
// over all channels. busy stays high while any channel still has focal points to
// produce. Packets of one scanline must enter in focal-point order.
//
// The sizes (array, window, step, channel count, sub-units, store depth, focal points,
// 14-bit sum) and the structure follow the original architecture. The single clock,
// the shared write address, the configuration bus, the packet format and handshakes,
// and leaving all sequencing to the memory-side processor are this design's choices.
module sm3d_top
  import sm3d_pkg::*;
#(
  parameter int ARR_X  = 120,
  parameter int ARR_Y  = 88,
  parameter int SUB    = 32,
  parameter int STEP   = 8,
  parameter int N_SUB  = 10,
  parameter int N_SAMP = 4096,
  parameter int N_FP   = 4096,
  parameter int FIFO_D = 16,
  localparam int N_CH  = SUB * SUB,
  localparam int CH_W  = (N_CH > 1) ? $clog2(N_CH) : 1,
  localparam int AW    = $clog2(N_SAMP),
  localparam int PW    = $clog2(ARR_X > ARR_Y ? ARR_X : ARR_Y),
  localparam int FW    = $clog2(((ARR_X - SUB) / STEP + 1) * ((ARR_Y - SUB) / STEP + 1) + 1),
  localparam int SXW   = $clog2((ARR_X + SUB - 1) / SUB),
  localparam int SYW   = $clog2((ARR_Y + SUB - 1) / SUB)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // firing sequence
  input  logic                 frame_start,
  input  logic                 fire_next,
  output logic [PW-1:0]        org_x,
  output logic [PW-1:0]        org_y,
  output logic [PW-1:0]        vs_x,
  output logic [PW-1:0]        vs_y,
  output logic [FW-1:0]        firing,
  output logic                 fire_active,
  output logic                 frame_done,
  output logic [SXW-1:0]       bank_sel_x [N_CH],
  output logic [SYW-1:0]       bank_sel_y [N_CH],
  // ADC samples
  input  logic                 rx_start,
  input  logic                 adc_valid,
  input  adc_t                 adc_sample [N_CH],
  output logic                 rx_full,
  // coefficient configuration
  input  logic                 cfg_we,
  input  logic                 cfg_bcast,
  input  logic [CH_W-1:0]      cfg_ch,
  input  logic [SL_W-1:0]      cfg_sub,
  input  logic [CFG_IDX_W-1:0] cfg_idx,
  input  logic [COEF_W-1:0]    cfg_data,
  // pass control
  input  logic                 pass_start,
  input  logic [N_SUB-1:0]     sub_en,
  input  logic [FP_W-1:0]      zb1,
  input  logic [FP_W-1:0]      zb2,
  output logic                 busy,
  // reduce network head (from memory) and tail (to memory)
  input  logic                 head_valid,
  input  rpkt_t                head_pkt,
  output logic                 head_ready,
  output logic                 tail_valid,
  output rpkt_t                tail_pkt,
  input  logic                 tail_ready
);
  logic [AW:0]  waddr;
  logic         adc_we;
  logic [N_CH:0] v, r;
  rpkt_t         pkt [N_CH+1];
  logic [N_CH-1:0] ch_busy;

  firing_sequencer #(.ARR_X(ARR_X), .ARR_Y(ARR_Y), .SUB(SUB), .STEP(STEP)) u_seq (
    .clk, .rst_n, .frame_start, .next(fire_next),
    .org_x, .org_y, .vs_x, .vs_y, .firing, .active(fire_active), .frame_done
  );

  // Shared ADC write address: all channels sample together.
  assign rx_full = (waddr == (AW+1)'(N_SAMP));
  assign adc_we  = adc_valid && !rx_full;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        waddr <= (AW+1)'(N_SAMP);
    else if (rx_start) waddr <= '0;
    else if (adc_we)   waddr <= waddr + 1'b1;
  end

  assign v[0]       = head_valid;
  assign pkt[0]     = head_pkt;
  assign head_ready = r[0];
  assign tail_valid = v[N_CH];
  assign tail_pkt   = pkt[N_CH];
  assign r[N_CH]    = tail_ready;
  assign busy       = |ch_busy;

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    bank_select #(.ARR_X(ARR_X), .ARR_Y(ARR_Y), .SUB(SUB)) u_bank (
      .bank_x($clog2(SUB)'(c % SUB)), .bank_y($clog2(SUB)'(c / SUB)),
      .org_x, .org_y, .tx(), .ty(),
      .sel_x(bank_sel_x[c]), .sel_y(bank_sel_y[c])
    );

    beamsum_channel #(
      .CH_W(CH_W), .N_SUB(N_SUB), .N_SAMP(N_SAMP), .N_FP(N_FP), .FIFO_D(FIFO_D)
    ) u_ch (
      .clk, .rst_n, .ch_id(CH_W'(c)),
      .adc_we, .adc_waddr(waddr[AW-1:0]), .adc_wdata(adc_sample[c]),
      .cfg_we, .cfg_bcast, .cfg_ch, .cfg_sub, .cfg_idx, .cfg_data,
      .start(pass_start), .sub_en, .zb1, .zb2, .busy(ch_busy[c]),
      .in_valid(v[c]), .in_pkt(pkt[c]), .in_ready(r[c]),
      .out_valid(v[c+1]), .out_pkt(pkt[c+1]), .out_ready(r[c+1])
    );
  end
endmodule
