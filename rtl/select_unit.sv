// Select unit of one channel: N_SUB (10) select sub-units that work concurrently on
// N_SUB scanlines, all fed by the channel's single interpolated sample stream. The
// stream advances (s_ready) unless a sub-unit that wants the current sample has a
// full queue. The unit also holds, per sub-unit, the scanline's 16 delay coefficients
// and 3 apodization weights, written over a word-wide configuration port (numbering
// in sm3d_pkg); registers reset to zero.
// Interface: cfg_* writes one coefficient per cycle; start begins a pass in the
// sub-units enabled by sub_en; q_pop/q_data/q_empty give the summing unit one queue
// per scanline; busy is high while any sub-unit still has focal points to produce.
// Ten sub-units on ten scanlines follow the design; the configuration port is this
// implementation's choice.
module select_unit
  import sm3d_pkg::*;
#(
  parameter int N_SUB  = 10,
  parameter int N_FP   = 4096,
  parameter int FIFO_D = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // coefficient configuration
  input  logic                 cfg_we,
  input  logic [SL_W-1:0]      cfg_sub,
  input  logic [CFG_IDX_W-1:0] cfg_idx,
  input  logic [COEF_W-1:0]    cfg_data,
  // pass control
  input  logic                 start,
  input  logic [N_SUB-1:0]     sub_en,
  input  logic [FP_W-1:0]      zb1,
  input  logic [FP_W-1:0]      zb2,
  // interpolated stream
  input  logic                 s_valid,
  input  logic [IDX_W-1:0]     s_idx,
  input  isamp_t               s_data,
  output logic                 s_ready,
  input  logic                 s_done,
  // queues
  input  logic [N_SUB-1:0]     q_pop,
  output isamp_t               q_data [N_SUB],
  output logic [N_SUB-1:0]     q_empty,
  output logic                 busy
);
  dcoef_t             coef [N_SUB];
  apod_t              w    [N_SUB][N_ZONE];
  logic [N_SUB-1:0]   block, sub_busy;
  logic               s_fire;

  assign s_ready = ~|block;
  assign s_fire  = s_valid && s_ready;
  assign busy    = |sub_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_SUB; i++) begin
        coef[i] <= '0;
        for (int z = 0; z < N_ZONE; z++) w[i][z] <= '0;
      end
    end else if (cfg_we && int'(cfg_sub) < N_SUB) begin
      if (cfg_idx == '0) coef[cfg_sub].start <= cfg_data;
      for (int s = 0; s < N_SECT; s++) begin
        if (int'(cfg_idx) == 1 + 5*s) coef[cfg_sub].sect[s].len   <= cfg_data[FP_W-1:0];
        if (int'(cfg_idx) == 2 + 5*s) coef[cfg_sub].sect[s].d0    <= cfg_data;
        if (int'(cfg_idx) == 3 + 5*s) coef[cfg_sub].sect[s].e0    <= cfg_data;
        if (int'(cfg_idx) == 4 + 5*s) coef[cfg_sub].sect[s].f     <= cfg_data;
        if (int'(cfg_idx) == 5 + 5*s) coef[cfg_sub].sect[s].shift <= cfg_data[3:0];
      end
      for (int z = 0; z < N_ZONE; z++)
        if (int'(cfg_idx) == CFG_APOD0 + z) w[cfg_sub][z] <= cfg_data[APOD_W-1:0];
    end
  end

  for (genvar i = 0; i < N_SUB; i++) begin : g_sub
    select_subunit #(.N_FP(N_FP), .FIFO_D(FIFO_D)) u_sub (
      .clk, .rst_n, .start, .en(sub_en[i]),
      .coef(coef[i]), .w(w[i]), .zb1, .zb2,
      .s_valid, .s_idx, .s_data, .s_fire, .s_done,
      .block(block[i]),
      .q_pop(q_pop[i]), .q_data(q_data[i]), .q_empty(q_empty[i]),
      .busy(sub_busy[i])
    );
  end
endmodule
