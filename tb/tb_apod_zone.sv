// Testbench for apod_zone: random samples, weights, focal points and zone bounds
// (half of the focal points on or next to a boundary),
// including full-scale samples with weights above 1.0 to exercise saturation;
// expected values from the reference floor(x*w/128) with 14-bit saturation.
module tb_apod_zone;
  import sm3d_pkg::*;
  import sm3d_ref_pkg::*;

  logic [FP_W-1:0] fp, zb1, zb2;
  apod_t w [N_ZONE];
  isamp_t x, y;
  logic [1:0] zone;
  int checks = 0, failures = 0, sat_seen = 0;
  logic clk = 0;

  apod_zone dut (.fp, .zb1, .zb2, .w, .x, .y, .zone);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int ez, ey;
      zb1 = FP_W'($urandom % 4096);
      zb2 = FP_W'(int'(zb1) + $urandom % (4097 - int'(zb1)));
      case (t % 8)   // half of the cases sit right at a zone boundary
        0: fp = zb1;
        1: fp = zb1 - 1'b1;
        2: fp = zb2;
        3: fp = zb2 - 1'b1;
        default: fp = FP_W'($urandom % 4096);
      endcase
      foreach (w[z]) w[z] = apod_t'($urandom);
      x = (t % 5 == 0) ? ((t % 2) ? isamp_t'(8191) : isamp_t'(-8192)) : isamp_t'($urandom);
      #1;
      ez = zone_of(int'(fp), int'(zb1), int'(zb2));
      ey = apod(int'(x), int'(w[ez]));
      if (ey == 8191 || ey == -8192) sat_seen++;
      checks++;
      if (int'(zone) != ez || int'(y) != ey) begin
        failures++;
        if (failures < 10) $display("x %0d w %0d fp %0d: y %0d exp %0d zone %0d exp %0d", x, w[ez], fp, y, ey, zone, ez);
      end
      #1;
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
