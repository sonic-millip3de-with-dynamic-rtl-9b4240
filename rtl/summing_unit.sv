// Summing unit: one stage of the channel-to-channel reduce network. A packet
// (scanline, focal point, partial sum) arriving from the previous channel is
// combined with the head of this channel's queue for that scanline: the sum is
// added (saturating, 14 bits) and the packet passes on. Packets of one scanline must
// arrive in focal-point order, matching the order in which the select sub-unit
// fills its queue; scanlines may interleave freely.
// Handshake: valid/ready on both sides. A packet is taken when it is valid, the
// scanline's queue is not empty and the 2-entry output buffer has room, so ready
// depends only on registered state and the queue head; the stage adds one cycle of
// latency and passes one packet per cycle. The pipelined, unidirectional network
// follows the design; the packet format and buffering are this implementation's.
module summing_unit
  import sm3d_pkg::*;
#(
  parameter int N_SUB = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  // from previous stage
  input  logic             in_valid,
  input  rpkt_t            in_pkt,
  output logic             in_ready,
  // this channel's queues
  output logic [N_SUB-1:0] q_pop,
  input  isamp_t           q_data [N_SUB],
  input  logic [N_SUB-1:0] q_empty,
  // to next stage
  output logic             out_valid,
  output rpkt_t            out_pkt,
  input  logic             out_ready
);
  localparam int PW = $bits(rpkt_t);
  logic  q_ok, obuf_full, obuf_empty, take;
  rpkt_t sum_pkt;
  sum_t  contrib;

  always_comb begin
    q_ok    = 1'b0;
    contrib = '0;
    for (int i = 0; i < N_SUB; i++)
      if (int'(in_pkt.sl) == i) begin
        q_ok    = !q_empty[i];
        contrib = sum_t'(q_data[i]);
      end
  end

  assign in_ready = q_ok && !obuf_full;
  assign take     = in_valid && in_ready;

  always_comb begin
    sum_pkt     = in_pkt;
    sum_pkt.sum = sat_add(in_pkt.sum, contrib);
    q_pop       = '0;
    for (int i = 0; i < N_SUB; i++)
      if (int'(in_pkt.sl) == i) q_pop[i] = take;
  end

  sync_fifo #(.W(PW), .DEPTH(2)) u_obuf (
    .clk, .rst_n,
    .push(take), .wdata(sum_pkt),
    .pop(out_valid && out_ready), .rdata(out_pkt),
    .full(obuf_full), .empty(obuf_empty)
  );
  assign out_valid = !obuf_empty;
endmodule
