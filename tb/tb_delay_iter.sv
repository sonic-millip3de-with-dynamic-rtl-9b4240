// Testbench for delay_iter: random piece-wise quadratic coefficient sets are loaded,
// the generator is stepped through 300 focal points with random idle cycles, and the
// integer index of every focal point is compared with the closed-form reference.
// Also checks the section counter and that one step takes one cycle.
module tb_delay_iter;
  import sm3d_pkg::*;
  import sm3d_ref_pkg::*;

  localparam int NFP = 300;
  logic clk = 0, rst_n = 0, start = 0, step = 0;
  dcoef_t coef;
  logic [IDX_W-1:0] idx;
  logic [FP_W-1:0] fp;
  logic [1:0] sect;
  int checks = 0, failures = 0;
  int ref_i[];

  delay_iter dut (.clk, .rst_n, .coef, .start, .step, .idx, .fp, .sect);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    coef = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      int exp_sect, jj;
      coef = gen_coef(NFP, 50);
      ref_idx(coef, NFP, ref_i);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      exp_sect = 0; jj = 0;
      for (int n = 0; n < NFP; n++) begin
        checks++;
        if (int'(idx) != ref_i[n] || int'(fp) != n || int'(sect) != exp_sect) begin
          failures++;
          if (failures < 10) $display("set %0d fp %0d: idx %0d exp %0d fp %0d sect %0d exp %0d",
                                      t, n, idx, ref_i[n], fp, sect, exp_sect);
        end
        jj++;
        if (exp_sect < 2 && jj == int'(coef.sect[exp_sect].len)) begin exp_sect++; jj = 0; end
        if ($urandom % 4 == 0) @(negedge clk);   // idle cycle
        step = 1;
        @(negedge clk);
        step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
