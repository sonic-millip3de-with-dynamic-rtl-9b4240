// One beamforming channel (computational pipeline), one per transducer bank:
//   channel_sram  - stores the bank's 12-bit ADC samples of the current firing
//   interp_unit   - streams them out 4x linearly interpolated
//   select_unit   - 10 sub-units pick and apodize the sample of each focal point
//                   on 10 scanlines
//   summing_unit  - adds the picked values into the packets of the reduce network
// Interface: ADC writes (we/waddr/wdata) fill the SRAM; configuration writes whose
// channel number equals ch_id, or that are broadcast, load this channel's
// coefficients; start begins a pass over the stored samples; the in_*/out_* packet
// ports link this channel into the channel chain. busy is high while the select
// sub-units still have focal points to produce. The channel number is a port tied
// to a constant rather than a parameter, so all channels are one and the same module.
module beamsum_channel
  import sm3d_pkg::*;
#(
  parameter int CH_W   = 10,
  parameter int N_SUB  = 10,
  parameter int N_SAMP = 4096,
  parameter int N_FP   = 4096,
  parameter int FIFO_D = 16,
  localparam int AW    = $clog2(N_SAMP)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CH_W-1:0]      ch_id,      // this channel's number (constant)
  // ADC side
  input  logic                 adc_we,
  input  logic [AW-1:0]        adc_waddr,
  input  adc_t                 adc_wdata,
  // configuration
  input  logic                 cfg_we,
  input  logic                 cfg_bcast,
  input  logic [CH_W-1:0]      cfg_ch,
  input  logic [SL_W-1:0]      cfg_sub,
  input  logic [CFG_IDX_W-1:0] cfg_idx,
  input  logic [COEF_W-1:0]    cfg_data,
  // pass control
  input  logic                 start,
  input  logic [N_SUB-1:0]     sub_en,
  input  logic [FP_W-1:0]      zb1,
  input  logic [FP_W-1:0]      zb2,
  output logic                 busy,
  // reduce network
  input  logic                 in_valid,
  input  rpkt_t                in_pkt,
  output logic                 in_ready,
  output logic                 out_valid,
  output rpkt_t                out_pkt,
  input  logic                 out_ready
);
  logic             re;
  logic [AW-1:0]    raddr;
  logic [ADC_W-1:0] rdata;
  logic             s_valid, s_ready, s_done;
  logic [IDX_W-1:0] s_idx;
  isamp_t           s_data;
  logic [N_SUB-1:0] q_pop, q_empty;
  isamp_t           q_data [N_SUB];
  logic             my_cfg;

  assign my_cfg = cfg_we && (cfg_bcast || cfg_ch == ch_id);

  channel_sram #(.DEPTH(N_SAMP), .W(ADC_W)) u_sram (
    .clk, .we(adc_we), .waddr(adc_waddr), .wdata(ADC_W'(adc_wdata)),
    .re, .raddr, .rdata
  );

  interp_unit #(.N_SAMP(N_SAMP)) u_interp (
    .clk, .rst_n, .start, .re, .raddr, .rdata(adc_t'(rdata)),
    .s_valid, .s_idx, .s_data, .s_ready, .s_done
  );

  select_unit #(.N_SUB(N_SUB), .N_FP(N_FP), .FIFO_D(FIFO_D)) u_select (
    .clk, .rst_n,
    .cfg_we(my_cfg), .cfg_sub, .cfg_idx, .cfg_data,
    .start, .sub_en, .zb1, .zb2,
    .s_valid, .s_idx, .s_data, .s_ready, .s_done,
    .q_pop, .q_data, .q_empty, .busy
  );

  summing_unit #(.N_SUB(N_SUB)) u_sum (
    .clk, .rst_n,
    .in_valid, .in_pkt, .in_ready,
    .q_pop, .q_data, .q_empty,
    .out_valid, .out_pkt, .out_ready
  );
endmodule
