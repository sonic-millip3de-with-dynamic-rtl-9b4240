// Testbench for one beamsum_channel (channel number 3; 2 sub-units, 32 stored samples, 20
// focal points, queue depth 4). Over four passes it stores random ADC samples,
// loads coefficients for this channel (and checks that writes addressed to another
// channel are ignored while broadcasts, whatever channel they name, are taken), starts a pass and sends one
// packet per scanline and focal point into the channel with a random partial sum.
// Each output packet must carry that sum plus the reference value: the 4x
// interpolated sample at the reference delay index, apodized by its zone's weight
// (zero past the stream end), with 14-bit saturation.
module tb_beamsum_channel;
  import sm3d_pkg::*;
  import sm3d_ref_pkg::*;

  localparam int NS = 2, NSAMP = 32, NFP = 20, AW = 5;
  logic clk = 0, rst_n = 0;
  logic [9:0] ch_id = 10'd3;
  logic adc_we = 0;
  logic [AW-1:0] adc_waddr = '0;
  adc_t adc_wdata = '0;
  logic cfg_we = 0, cfg_bcast = 0;
  logic [9:0] cfg_ch = '0;
  logic [SL_W-1:0] cfg_sub = '0;
  logic [CFG_IDX_W-1:0] cfg_idx = '0;
  logic [COEF_W-1:0] cfg_data = '0;
  logic start = 0, busy;
  logic [NS-1:0] sub_en = '1;
  logic [FP_W-1:0] zb1 = FP_W'(6), zb2 = FP_W'(13);
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  rpkt_t in_pkt = '0, out_pkt;
  int checks = 0, failures = 0;
  int x[];
  dcoef_t c [NS];
  apod_t w [NS][N_ZONE];

  beamsum_channel #(.N_SUB(NS), .N_SAMP(NSAMP), .N_FP(NFP), .FIFO_D(4)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired: busy %0d in_valid %0d in_ready %0d sl %0d fp %0d q_empty %b s_valid %0d s_idx %0d s_done %0d idx0 %0d idx1 %0d fp0 %0d fp1 %0d", busy, in_valid, in_ready, in_pkt.sl, in_pkt.fp, dut.q_empty, dut.s_valid, dut.s_idx, dut.s_done, dut.u_select.g_sub[0].u_sub.idx, dut.u_select.g_sub[1].u_sub.idx, dut.u_select.g_sub[0].u_sub.fp, dut.u_select.g_sub[1].u_sub.fp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg_write(bit bc, int ch, int sub, int idx, logic [31:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_bcast = bc; cfg_ch = 10'(ch); cfg_sub = SL_W'(sub);
    cfg_idx = CFG_IDX_W'(idx); cfg_data = d;
    @(negedge clk);
    cfg_we = 0; cfg_bcast = 0;
  endtask

  initial begin
    x = new[NSAMP];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 4; pass++) begin
      int hs [$], hf [$], hv [$];
      int got, sent;
      hs.delete(); hf.delete(); hv.delete();
      for (int i = 0; i < NSAMP; i++) begin
        @(negedge clk);
        adc_we = 1; adc_waddr = AW'(i); adc_wdata = adc_t'($urandom); x[i] = int'(adc_wdata);
      end
      @(negedge clk); adc_we = 0;
      for (int s = 0; s < NS; s++) begin
        dcoef_t junk;
        apod_t jw [N_ZONE];
        c[s] = (s == 0) ? gen_coef(NFP, 8) : gen_near(c[0], NFP);
        foreach (w[s][z]) w[s][z] = apod_t'(32 + $urandom % 160);
        for (int k = 0; k < 19; k++) cfg_write(pass % 2, (pass % 2) ? 9 : 3, s, k, cfg_word(c[s], k, w[s]));
        junk = gen_coef(NFP, 8);
        foreach (jw[z]) jw[z] = apod_t'($urandom);
        for (int k = 0; k < 19; k++) cfg_write(0, 4, s, k, cfg_word(junk, k, jw));
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      for (int fp = 0; fp < NFP; fp++)
        for (int s = 0; s < NS; s++) begin hs.push_back(s); hf.push_back(fp); hv.push_back(int'(sum_t'($urandom))); end
      got = 0; sent = 0;
      while (got < hs.size()) begin
        bit hfire, tfire;
        if (!in_valid && sent < hs.size() && $urandom % 4 != 0) begin
          in_valid = 1;
          in_pkt.sl = SL_W'(hs[sent]); in_pkt.fp = FP_W'(hf[sent]); in_pkt.sum = sum_t'(hv[sent]);
        end
        out_ready = ($urandom % 3 != 0);
        #1;
        hfire = in_valid && in_ready;
        tfire = out_valid && out_ready;
        if (tfire) begin
          int s, fp, z, v, e;
          int ri[];
          s = hs[got]; fp = hf[got];
          ref_idx(c[s], NFP, ri);
          z = zone_of(fp, int'(zb1), int'(zb2));
          v = (ri[fp] < 4 * NSAMP) ? apod(interp(x, ri[fp]), int'(w[s][z])) : 0;
          e = hv[got] + v;
          e = (e > 8191) ? 8191 : (e < -8192) ? -8192 : e;
          checks++;
          if (int'(out_pkt.sl) != s || int'(out_pkt.fp) != fp || int'(out_pkt.sum) != e) begin
            failures++;
            if (failures < 10) $display("pass %0d sl %0d fp %0d: sum %0d exp %0d", pass, s, fp, out_pkt.sum, e);
          end
          got++;
        end
        @(negedge clk);
        if (hfire) begin in_valid = 0; sent++; end
      end
      out_ready = 0;
      repeat (3) @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("pass %0d: still busy", pass); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
