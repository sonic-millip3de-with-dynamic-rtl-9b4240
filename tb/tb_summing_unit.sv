// Testbench for summing_unit with 3 scanline queues modelled in the testbench.
// Packets with random scanline numbers and partial sums (some near full scale, to
// force saturation) enter with random gaps; the queues fill at random and the
// output is drained at random. Every output packet is checked against the reference
// (same scanline and focal point, saturated sum with the queue head of that
// scanline), in order. A final burst with all queues full and the output always
// ready checks the rate of one packet per cycle.
module tb_summing_unit;
  import sm3d_pkg::*;

  localparam int NS = 3, NPK = 3000;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  rpkt_t in_pkt, out_pkt;
  logic [NS-1:0] q_pop, q_empty;
  isamp_t q_data [NS];
  int checks = 0, failures = 0, n_sat = 0;
  int q [NS][$];
  rpkt_t expq [$];
  int sent;

  summing_unit #(.N_SUB(NS)) dut (.clk, .rst_n, .in_valid, .in_pkt, .in_ready,
    .q_pop, .q_data, .q_empty, .out_valid, .out_pkt, .out_ready);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb
    for (int i = 0; i < NS; i++) begin
      q_empty[i] = (q[i].size() == 0);
      q_data[i]  = (q[i].size() != 0) ? isamp_t'(q[i][0]) : '0;
    end

  function automatic int satr(int s);
    return (s > 8191) ? 8191 : (s < -8192) ? -8192 : s;
  endfunction

  task automatic run(int n, bit burst, output int cycles);
    int got, fp;
    got = 0; sent = 0; cycles = 0; fp = 0;
    in_valid = 0;
    while (got < n) begin
      bit take, popped;
      if (!in_valid || in_ready) begin
        in_valid = (sent < n) && (burst || $urandom % 3 != 0);
        in_pkt.sl  = SL_W'($urandom % NS);
        in_pkt.fp  = FP_W'(fp);
        in_pkt.sum = ($urandom % 4 == 0) ? sum_t'(($urandom % 2) ? 8000 : -8000) : sum_t'($urandom);
      end
      for (int i = 0; i < NS; i++)
        if (!burst && q[i].size() < 3 && $urandom % 2 == 0) q[i].push_back(int'(isamp_t'($urandom)));
        else if (burst && q[i].size() < 3) q[i].push_back(int'(isamp_t'($urandom % 1000)));
      out_ready = burst || ($urandom % 4 != 0);
      #1;
      take = in_valid && in_ready;
      popped = out_valid && out_ready;
      if (take) begin
        rpkt_t e;
        int s;
        e = in_pkt;
        s = int'(in_pkt.sum) + q[in_pkt.sl][0];
        if (s != satr(s)) n_sat++;
        e.sum = sum_t'(satr(s));
        expq.push_back(e);
        checks++;
        if (q_pop != NS'(1) << in_pkt.sl) begin failures++; $display("wrong queue popped"); end
      end else begin
        checks++;
        if (q_pop != '0) begin failures++; $display("queue popped without a packet"); end
      end
      if (popped) begin
        checks++;
        if (expq.size() == 0 || out_pkt != expq[0]) begin
          failures++;
          if (failures < 10) $display("out sl %0d fp %0d sum %0d exp sum %0d", out_pkt.sl, out_pkt.fp, out_pkt.sum, expq[0].sum);
        end
        if (expq.size() != 0) void'(expq.pop_front());
        got++;
      end
      @(negedge clk);
      cycles++;
      if (take) begin void'(q[in_pkt.sl].pop_front()); sent++; fp++; in_valid = 0; end
    end
    in_valid = 0;
  endtask

  initial begin
    int cyc;
    in_valid = 0; in_pkt = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    run(NPK, 0, cyc);
    run(200, 1, cyc);
    checks++;
    if (cyc > 200 + 2) begin failures++; $display("burst of 200 took %0d cycles", cyc); end
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never happened"); end
    $display("saturated sums %0d, burst cycles %0d", n_sat, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
