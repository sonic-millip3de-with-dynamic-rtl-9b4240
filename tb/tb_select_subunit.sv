// Testbench for select_subunit (N_FP = 64 focal points, queue depth 4). The
// testbench plays the shared stream: 150 random values with random gaps, advancing
// whenever the sub-unit does not block. The queue is drained at random, so the
// sub-unit must block the stream when its queue is full. Every queued value is
// compared with the reference: apodized stream value at the reference delay index,
// or zero when that index lies beyond the end of the stream. Counts that blocking,
// zero fill and all three apodization zones happened.
module tb_select_subunit;
  import sm3d_pkg::*;
  import sm3d_ref_pkg::*;

  localparam int NFP = 64, L = 150;
  logic clk = 0, rst_n = 0, start = 0, en = 1;
  dcoef_t coef;
  apod_t w [N_ZONE];
  logic [FP_W-1:0] zb1, zb2;
  logic s_valid, s_fire, s_done, block, q_pop, q_empty, busy;
  logic [IDX_W-1:0] s_idx;
  isamp_t s_data, q_data;
  int checks = 0, failures = 0, n_block = 0, n_zero = 0;
  int zone_seen [3];
  int data [L];
  int ref_i[];
  int sp;      // stream position
  bit fired;

  select_subunit #(.N_FP(NFP), .FIFO_D(4)) dut (
    .clk, .rst_n, .start, .en, .coef, .w, .zb1, .zb2,
    .s_valid, .s_idx, .s_data, .s_fire, .s_done, .block,
    .q_pop, .q_data, .q_empty, .busy);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign s_idx  = IDX_W'(sp);
  assign s_data = (sp < L) ? isamp_t'(data[sp]) : '0;
  assign s_done = (sp >= L);
  assign s_fire = s_valid && !block;

  initial begin
    coef = '0; s_valid = 0; q_pop = 0; sp = L;
    foreach (w[z]) w[z] = '0;
    zb1 = '0; zb2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      int got;
      coef = gen_coef(NFP, 40);
      ref_idx(coef, NFP, ref_i);
      foreach (w[z]) w[z] = apod_t'(64 + $urandom % 128);
      zb1 = FP_W'(10 + $urandom % 20); zb2 = FP_W'(int'(zb1) + 5 + $urandom % 20);
      foreach (data[i]) data[i] = int'(isamp_t'($urandom));
      @(negedge clk); start = 1; sp = 0;
      @(negedge clk); start = 0;
      got = 0;
      while (got < NFP) begin
        s_valid = (sp < L) && ($urandom % 4 != 0);
        q_pop   = ($urandom % 3 == 0);
        #1;
        fired = s_fire;
        if (block) n_block++;
        if (q_pop && !q_empty) begin
          int e, z;
          z = zone_of(got, int'(zb1), int'(zb2));
          e = (ref_i[got] < L) ? apod(data[ref_i[got]], int'(w[z])) : 0;
          if (ref_i[got] >= L) n_zero++; else zone_seen[z]++;
          checks++;
          if (int'(q_data) != e) begin
            failures++;
            if (failures < 10) $display("set %0d fp %0d (idx %0d): %0d exp %0d", t, got, ref_i[got], q_data, e);
          end
          got++;
        end
        @(negedge clk);
        if (fired) sp++;
      end
      q_pop = 0; s_valid = 0;
      repeat (2) @(negedge clk);
      checks++;
      if (busy || !q_empty) begin failures++; $display("set %0d: not idle after %0d focal points", t, NFP); end
    end
    checks += 3;
    if (n_block == 0) begin failures++; $display("stream never blocked"); end
    if (n_zero == 0) begin failures++; $display("zero fill never happened"); end
    if (zone_seen[0] == 0 || zone_seen[1] == 0 || zone_seen[2] == 0) begin failures++; $display("a zone was never used"); end
    $display("blocked cycles %0d, zero-filled %0d", n_block, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
