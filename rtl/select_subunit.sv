// Select sub-unit: follows one scanline through the channel's interpolated sample
// stream. Its delay generator (delay_iter) gives the stream index of the sample
// nearest the current focal point; when that sample passes by, the sub-unit takes
// it, weights it with the zonal apodization (apod_zone), pushes it into its queue
// for the summing unit and advances to the next focal point. Ten of these share one
// stream (select_unit), each on its own scanline.
//
// Stream rules: the stream index rises by one per accepted value; the sub-unit takes
// at most one focal point per value, so the delay coefficients must advance the
// sample index by at least one per focal point (checked by an assertion). If the
// sub-unit has a value to take but its queue is full it raises `block`, which holds
// the shared stream. Focal points whose sample lies beyond the end of the stream
// (s_done) are produced as zeros. After N_FP focal points the sub-unit goes idle.
// Queue depth, zero fill past the stream end and the one-value-per-focal-point rule
// are this implementation's choices.
module select_subunit
  import sm3d_pkg::*;
#(
  parameter int N_FP   = 4096,
  parameter int FIFO_D = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,      // begin a pass
  input  logic             en,         // this sub-unit takes part in the pass
  input  dcoef_t           coef,
  input  apod_t            w [N_ZONE],
  input  logic [FP_W-1:0]  zb1,
  input  logic [FP_W-1:0]  zb2,
  // shared interpolated stream
  input  logic             s_valid,
  input  logic [IDX_W-1:0] s_idx,
  input  isamp_t           s_data,
  input  logic             s_fire,     // stream value accepted this cycle
  input  logic             s_done,
  output logic             block,
  // queue towards the summing unit
  input  logic             q_pop,
  output isamp_t           q_data,
  output logic             q_empty,
  output logic             busy
);
  logic             active, hit, flush, emit, full;
  logic [IDX_W-1:0] idx;
  logic [FP_W-1:0]  fp;
  logic [1:0]       sect, zone;
  isamp_t           apod_x;

  delay_iter u_delay (
    .clk, .rst_n, .coef, .start, .step(emit), .idx, .fp, .sect
  );

  apod_zone u_apod (
    .fp, .zb1, .zb2, .w, .x(s_data), .y(apod_x), .zone
  );

  assign hit   = active && s_valid && (s_idx == idx);
  assign flush = active && s_done;
  assign block = hit && full;
  assign emit  = (hit && s_fire) || (flush && !full);
  assign busy  = active;

  sync_fifo #(.W(IS_W), .DEPTH(FIFO_D)) u_q (
    .clk, .rst_n,
    .push(emit), .wdata(hit ? apod_x : isamp_t'(0)),
    .pop(q_pop), .rdata(q_data), .full, .empty(q_empty)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                   active <= 1'b0;
    else if (start)                               active <= en;
    else if (emit && fp == FP_W'(N_FP - 1))       active <= 1'b0;
  end

  // The focal point's sample must never have passed by unseen.
  a_no_miss: assert property (@(posedge clk) disable iff (!rst_n)
    (active && s_valid && !start) |-> (idx >= s_idx))
    else $error("select_subunit: focal point sample index %0d already passed (stream at %0d)", idx, s_idx);
endmodule
