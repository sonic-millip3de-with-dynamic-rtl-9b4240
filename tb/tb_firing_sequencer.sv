// Testbench for firing_sequencer at its defaults (120x88 array, 32x32 window, step
// 8): runs two frames with random gaps between firings and checks every window
// origin and virtual-source centre against the expected raster, the firing count
// (96 per frame), that every window lies inside the array, and the frame_done pulse.
module tb_firing_sequencer;
  logic clk = 0, rst_n = 0, frame_start = 0, next = 0;
  logic [6:0] org_x, org_y, vs_x, vs_y, firing;
  logic active, frame_done;
  int checks = 0, failures = 0;

  firing_sequencer dut (.clk, .rst_n, .frame_start, .next, .org_x, .org_y, .vs_x, .vs_y,
                        .firing, .active, .frame_done);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      int n;
      @(negedge clk); frame_start = 1;
      @(negedge clk); frame_start = 0;
      n = 0;
      while (active) begin
        chk(int'(org_x) == 8 * (n % 12) && int'(org_y) == 8 * (n / 12), $sformatf("firing %0d origin %0d,%0d", n, org_x, org_y));
        chk(int'(vs_x) == int'(org_x) + 16 && int'(vs_y) == int'(org_y) + 16, "virtual source");
        chk(int'(firing) == n, "firing number");
        chk(int'(org_x) + 32 <= 120 && int'(org_y) + 32 <= 88, "window inside array");
        chk(!frame_done, "early frame_done");
        repeat ($urandom % 3) @(negedge clk);
        next = 1;
        @(negedge clk);
        next = 0;
        n++;
        if (n == 96) chk(frame_done, "frame_done pulse");
      end
      chk(n == 96, $sformatf("%0d firings per frame", n));
      @(negedge clk);
      chk(!frame_done, "frame_done longer than one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
