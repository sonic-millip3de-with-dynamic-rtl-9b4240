// End-to-end testbench of sm3d_top at reduced size: 8x6 array, 4x4 sub-aperture
// stepped by 2 (16 channels, 6 firings per frame), 3 sub-units, 24 stored samples
// and 24 focal points per scanline, queue depth 4.
//
// For every firing of one frame it checks the bank selects, stores random ADC
// samples (extra strobes after the store is full must be ignored), loads delay and
// apodization coefficients (a broadcast set, then individual sets for all but one
// channel; the scanlines of one pass are neighbours with nearly equal delays, as a
// channel's queues only absorb a small lead of one scanline over another), starts a pass and plays the memory side of the reduce network: packets
// enter at the head in focal-point-major order with the current image value, and the
// tail results, written back to the image, are compared with a reference that
// interpolates, delays, apodizes and sums (with saturation, channel by channel)
// independently of the RTL. The image accumulates over all firings.
// Mechanisms counted, each of which must occur: stream held by a full queue, head
// back-pressure, tail back-pressure, zero fill past the stream end, delay section
// switches, all three apodization zones, saturated sums, a disabled sub-unit,
// per-channel and broadcast configuration, ignored ADC strobes, frame completion.
module tb_sm3d_top;
  import sm3d_pkg::*;
  import sm3d_ref_pkg::*;

  localparam int ARR_X = 8, ARR_Y = 6, SUB = 4, STEP = 2;
  localparam int NS = 3, NSAMP = 24, NFP = 24, FD = 4;
  localparam int NCH = SUB * SUB;
  localparam int NFIRE = ((ARR_X - SUB) / STEP + 1) * ((ARR_Y - SUB) / STEP + 1);
  localparam int PW = $clog2(ARR_X > ARR_Y ? ARR_X : ARR_Y);
  localparam int FW = $clog2(NFIRE + 1);
  localparam int CW = (NCH > 1) ? $clog2(NCH) : 1;
  localparam int SXW = $clog2((ARR_X + SUB - 1) / SUB), SYW = $clog2((ARR_Y + SUB - 1) / SUB);
  localparam int MAX_FIRINGS = NFIRE;   // firings simulated
  localparam int N_INDIV = NCH;         // channels given their own coefficients
  localparam longint WATCHDOG = 400000;

  logic clk = 0, rst_n = 0;
  logic frame_start = 0, fire_next = 0, fire_active, frame_done;
  logic [PW-1:0] org_x, org_y, vs_x, vs_y;
  logic [FW-1:0] firing;
  logic [SXW-1:0] bank_sel_x [NCH];
  logic [SYW-1:0] bank_sel_y [NCH];
  logic rx_start = 0, adc_valid = 0, rx_full;
  adc_t adc_sample [NCH];
  logic cfg_we = 0, cfg_bcast = 0;
  logic [CW-1:0] cfg_ch = '0;
  logic [SL_W-1:0] cfg_sub = '0;
  logic [CFG_IDX_W-1:0] cfg_idx = '0;
  logic [COEF_W-1:0] cfg_data = '0;
  logic pass_start = 0, busy;
  logic [NS-1:0] sub_en = '1;
  logic [FP_W-1:0] zb1, zb2;
  logic head_valid = 0, head_ready, tail_valid, tail_ready = 0;
  rpkt_t head_pkt, tail_pkt;

  sm3d_top #(.ARR_X(ARR_X), .ARR_Y(ARR_Y), .SUB(SUB), .STEP(STEP), .N_SUB(NS),
             .N_SAMP(NSAMP), .N_FP(NFP), .FIFO_D(FD)) dut (.*);

  int checks = 0, failures = 0;
  int n_hold = 0, n_head_bp = 0, n_tail_bp = 0, n_zero = 0, n_sect = 0, n_sat = 0;
  int n_zone [3];
  int n_disabled = 0, n_percfg = 0, n_bcast = 0, n_ignored = 0, n_frame = 0;
  int x [NCH][];
  dcoef_t c [NCH][NS];
  apod_t w [NCH][NS][N_ZONE];
  int img [NS][NFP];
  int expv [NS][NFP];

  always #5 clk = ~clk;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stream holds inside any channel.
  for (genvar ch = 0; ch < NCH; ch++) begin : g_mon
    always @(posedge clk)
      if (dut.g_ch[ch].u_ch.s_valid && !dut.g_ch[ch].u_ch.s_ready) n_hold++;
  end
  always @(posedge clk) begin
    if (head_valid && !head_ready) n_head_bp++;
    if (tail_valid && !tail_ready) n_tail_bp++;
  end
  always @(negedge clk) if (frame_done) n_frame++;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 15) $display("FAIL: %s", msg); end
  endtask

  task automatic cfg_write(bit bc, int ch, int sub, int idx, logic [31:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_bcast = bc; cfg_ch = CW'(ch); cfg_sub = SL_W'(sub);
    cfg_idx = CFG_IDX_W'(idx); cfg_data = d;
    @(negedge clk);
    cfg_we = 0; cfg_bcast = 0;
  endtask

  task automatic do_firing(int f, bit big, bit some_off);
    int total, got, sent;
    int hs [$], hf [$];
    // bank selects for this window
    for (int ch = 0; ch < NCH; ch++) begin
      int bx, by, tx, ty;
      bx = ch % SUB; by = ch / SUB;
      tx = int'(org_x) + ((bx - int'(org_x) % SUB + SUB) % SUB);
      ty = int'(org_y) + ((by - int'(org_y) % SUB + SUB) % SUB);
      chk(int'(bank_sel_x[ch]) == tx / SUB && int'(bank_sel_y[ch]) == ty / SUB,
          $sformatf("firing %0d bank %0d select", f, ch));
    end
    // receive
    @(negedge clk); rx_start = 1;
    @(negedge clk); rx_start = 0;
    for (int ch = 0; ch < NCH; ch++) x[ch] = new[NSAMP];
    for (int i = 0; i < NSAMP + 3; i++) begin
      @(negedge clk);
      adc_valid = 1;
      for (int ch = 0; ch < NCH; ch++) begin
        adc_sample[ch] = big ? adc_t'($urandom) : adc_t'(int'($urandom % 601) - 300);
        if (i < NSAMP) x[ch][i] = int'(adc_sample[ch]);
      end
      if (i >= NSAMP) n_ignored++;
      if ($urandom % 3 == 0) begin @(negedge clk); adc_valid = 0; end
    end
    @(negedge clk); adc_valid = 0;
    chk(rx_full, "store full after the firing's samples");
    // coefficients: broadcast, then per channel for all but channel 5
    for (int s = 0; s < NS; s++) begin
      c[0][s] = (s == 0) ? gen_coef(NFP, 12) : gen_near(c[0][0], NFP);
      foreach (w[0][s][z]) w[0][s][z] = apod_t'(16 + $urandom % 180);
      for (int k = 0; k < 19; k++) cfg_write(1, 0, s, k, cfg_word(c[0][s], k, w[0][s]));
      n_bcast++;
    end
    for (int ch = 1; ch < NCH; ch++) begin
      for (int s = 0; s < NS; s++) begin
        if (ch == 5 || ch >= N_INDIV) begin
          c[ch][s] = c[0][s]; w[ch][s] = w[0][s];
        end else begin
          c[ch][s] = (s == 0) ? gen_coef(NFP, 12) : gen_near(c[ch][0], NFP);
          foreach (w[ch][s][z]) w[ch][s][z] = apod_t'(16 + $urandom % 180);
          for (int k = 0; k < 19; k++) cfg_write(0, ch, s, k, cfg_word(c[ch][s], k, w[ch][s]));
          n_percfg++;
        end
      end
    end
    zb1 = FP_W'(NFP / 4 + $urandom % 4);
    zb2 = FP_W'(NFP / 2 + $urandom % 4);
    sub_en = some_off ? ~(NS'(1) << (NS - 1)) : '1;
    if (some_off) n_disabled++;
    // reference
    foreach (expv[s, fp]) expv[s][fp] = img[s][fp];
    for (int ch = 0; ch < NCH; ch++)
      for (int s = 0; s < NS; s++) begin
        int ri[];
        ref_idx(c[ch][s], NFP, ri);
        for (int fp = 0; fp < NFP; fp++) begin
          int v, sum, z;
          z = zone_of(fp, int'(zb1), int'(zb2));
          if (ri[fp] < 4 * NSAMP) begin v = apod(interp(x[ch], ri[fp]), int'(w[ch][s][z])); n_zone[z]++; end
          else begin v = 0; n_zero++; end
          sum = expv[s][fp] + v;
          if (sum > 8191 || sum < -8192) n_sat++;
          expv[s][fp] = (sum > 8191) ? 8191 : (sum < -8192) ? -8192 : sum;
        end
        for (int k = 0; k < N_SECT - 1; k++) begin
          int b;
          b = 0;
          for (int kk = 0; kk <= k; kk++) b += int'(c[ch][s].sect[kk].len);
          if (b < NFP) n_sect++;
        end
      end
    // pass
    @(negedge clk); pass_start = 1;
    @(negedge clk); pass_start = 0;
    for (int fp = 0; fp < NFP; fp++)
      for (int s = 0; s < NS; s++)
        if (sub_en[s]) begin hs.push_back(s); hf.push_back(fp); end
    total = hs.size(); got = 0; sent = 0;
    while (got < total) begin
      bit hfire, tfire;
      if (!head_valid && sent < total && $urandom % 5 != 0) begin
        head_valid = 1;
        head_pkt.sl = SL_W'(hs[sent]); head_pkt.fp = FP_W'(hf[sent]);
        head_pkt.sum = sum_t'(img[hs[sent]][hf[sent]]);
      end
      tail_ready = ($urandom % 4 != 0);
      #1;
      hfire = head_valid && head_ready;
      tfire = tail_valid && tail_ready;
      if (tfire) begin
        int s, fp;
        s = int'(tail_pkt.sl); fp = int'(tail_pkt.fp);
        chk(s == hs[got] && fp == hf[got], $sformatf("tail order: got %0d/%0d", s, fp));
        chk(int'(tail_pkt.sum) == expv[s][fp],
            $sformatf("firing %0d sl %0d fp %0d: sum %0d exp %0d", f, s, fp, tail_pkt.sum, expv[s][fp]));
        img[s][fp] = int'(tail_pkt.sum);
        got++;
      end
      @(negedge clk);
      if (hfire) begin head_valid = 0; sent++; end
    end
    tail_ready = 0;
    repeat (4) @(negedge clk);
    chk(!busy, "channels idle after the pass");
  endtask

  initial begin
    foreach (adc_sample[ch]) adc_sample[ch] = '0;
    head_pkt = '0; zb1 = '0; zb2 = '0;
    foreach (img[s, fp]) img[s][fp] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); frame_start = 1;
    @(negedge clk); frame_start = 0;
    for (int f = 0; f < MAX_FIRINGS; f++) begin
      chk(fire_active && int'(firing) == f, $sformatf("firing number %0d", f));
      do_firing(f, (f == 1), (f == 2 || MAX_FIRINGS == 1));
      @(negedge clk); fire_next = 1;
      @(negedge clk); fire_next = 0;
    end
    repeat (3) @(negedge clk);
    chk(MAX_FIRINGS < NFIRE || !fire_active, "frame finished");
    $display("holds %0d head-bp %0d tail-bp %0d zero %0d sect %0d zones %0d/%0d/%0d sat %0d off %0d percfg %0d bcast %0d ignored %0d frames %0d",
             n_hold, n_head_bp, n_tail_bp, n_zero, n_sect, n_zone[0], n_zone[1], n_zone[2], n_sat,
             n_disabled, n_percfg, n_bcast, n_ignored, n_frame);
    chk(n_hold > 0, "stream hold never happened");
    chk(n_head_bp > 0, "head back-pressure never happened");
    chk(n_tail_bp > 0, "tail back-pressure never happened");
    chk(n_zero > 0, "zero fill never happened");
    chk(n_sect > 0, "section switch never happened");
    chk(n_zone[0] > 0 && n_zone[1] > 0 && n_zone[2] > 0, "an apodization zone was never used");
    chk(n_sat > 0, "saturation never happened");
    chk(n_disabled > 0 && n_percfg > 0 && n_bcast > 0, "configuration modes");
    chk(n_ignored > 0, "ADC strobes past a full store never happened");
    chk(MAX_FIRINGS < NFIRE || n_frame == 1, "frame_done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
