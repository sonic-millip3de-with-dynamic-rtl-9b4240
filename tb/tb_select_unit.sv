// Testbench for select_unit with 3 sub-units (32 focal points, queue depth 4).
// Coefficients and weights are written over the configuration port (plus writes to
// a non-existent sub-unit, which must change nothing). The testbench plays a shared
// stream of 120 random values and drains the three queues at random. Each queue is
// checked against the reference for its scanline; sub-unit 2 is disabled in the
// second pass and must stay silent. Counts that the stream was held at least once.
module tb_select_unit;
  import sm3d_pkg::*;
  import sm3d_ref_pkg::*;

  localparam int NS = 3, NFP = 32, L = 120;
  logic clk = 0, rst_n = 0, start = 0;
  logic cfg_we = 0;
  logic [SL_W-1:0] cfg_sub = '0;
  logic [CFG_IDX_W-1:0] cfg_idx = '0;
  logic [COEF_W-1:0] cfg_data = '0;
  logic [NS-1:0] sub_en, q_pop, q_empty;
  logic [FP_W-1:0] zb1, zb2;
  logic s_valid, s_ready, s_done, busy;
  logic [IDX_W-1:0] s_idx;
  isamp_t s_data;
  isamp_t q_data [NS];
  int checks = 0, failures = 0, n_hold = 0;
  int data [L];
  int sp;
  bit fired;
  dcoef_t c [NS];
  apod_t w [NS][N_ZONE];
  int ref_i [NS][];

  select_unit #(.N_SUB(NS), .N_FP(NFP), .FIFO_D(4)) dut (
    .clk, .rst_n, .cfg_we, .cfg_sub, .cfg_idx, .cfg_data, .start, .sub_en, .zb1, .zb2,
    .s_valid, .s_idx, .s_data, .s_ready, .s_done, .q_pop, .q_data, .q_empty, .busy);

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

  task automatic cfg(int sub, int idx, logic [31:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_sub = SL_W'(sub); cfg_idx = CFG_IDX_W'(idx); cfg_data = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    s_valid = 0; q_pop = '0; sp = L; sub_en = '1;
    zb1 = FP_W'(8); zb2 = FP_W'(20);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      int got [NS];
      bit done;
      sub_en = (pass == 0) ? 3'b111 : 3'b011;
      for (int i = 0; i < NS; i++) begin
        c[i] = gen_coef(NFP, 10);
        foreach (w[i][z]) w[i][z] = apod_t'(32 + $urandom % 160);
        ref_idx(c[i], NFP, ref_i[i]);
        for (int k = 0; k < 19; k++) cfg(i, k, cfg_word(c[i], k, w[i]));
        got[i] = 0;
      end
      for (int k = 0; k < 19; k++) cfg(NS, k, 32'hdead_beef);   // no such sub-unit
      foreach (data[i]) data[i] = int'(isamp_t'($urandom));
      @(negedge clk); start = 1; sp = 0;
      @(negedge clk); start = 0;
      done = 0;
      while (!done) begin
        s_valid = (sp < L) && ($urandom % 5 != 0);
        for (int i = 0; i < NS; i++) q_pop[i] = ($urandom % 4 == 0);
        #1;
        fired = s_valid && s_ready;
        if (s_valid && !s_ready) n_hold++;
        for (int i = 0; i < NS; i++)
          if (q_pop[i] && !q_empty[i]) begin
            int e, z;
            checks++;
            if (!sub_en[i] || got[i] >= NFP) begin
              failures++; $display("pass %0d: unexpected value from sub-unit %0d", pass, i);
            end else begin
              z = zone_of(got[i], int'(zb1), int'(zb2));
              e = (ref_i[i][got[i]] < L) ? apod(data[ref_i[i][got[i]]], int'(w[i][z])) : 0;
              if (int'(q_data[i]) != e) begin
                failures++;
                if (failures < 10) $display("pass %0d sub %0d fp %0d: %0d exp %0d", pass, i, got[i], q_data[i], e);
              end
              got[i]++;
            end
          end
        @(negedge clk);
        if (fired) sp++;
        done = 1;
        for (int i = 0; i < NS; i++) if (sub_en[i] && got[i] < NFP) done = 0;
      end
      q_pop = '0; s_valid = 0;
      repeat (3) @(negedge clk);
      checks++;
      if (busy || !(&q_empty)) begin failures++; $display("pass %0d: not idle at the end", pass); end
    end
    checks++;
    if (n_hold == 0) begin failures++; $display("stream never held"); end
    $display("stream held %0d cycles", n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
