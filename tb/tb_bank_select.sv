// Testbench for bank_select at its defaults: for every one of the 96 window origins
// and every one of the 1024 banks, checks that the selected transducer lies inside
// the 32x32 window and inside the array, belongs to the bank (coordinates mod 32),
// and that the bank-internal number matches its position; then checks that the
// 1024 selected transducers of each window are all different.
module tb_bank_select;
  logic [4:0] bank_x, bank_y;
  logic [6:0] org_x, org_y, tx, ty;
  logic [1:0] sel_x, sel_y;
  int checks = 0, failures = 0;
  logic clk = 0;
  bit used [120][88];

  bank_select dut (.bank_x, .bank_y, .org_x, .org_y, .tx, .ty, .sel_x, .sel_y);

  always #5 clk = ~clk;
  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int oy = 0; oy <= 56; oy += 8)
      for (int ox = 0; ox <= 88; ox += 8) begin
        int distinct;
        foreach (used[i, j]) used[i][j] = 0;
        distinct = 0;
        for (int b = 0; b < 1024; b++) begin
          org_x = 7'(ox); org_y = 7'(oy); bank_x = 5'(b % 32); bank_y = 5'(b / 32);
          #1;
          checks++;
          if (int'(tx) < ox || int'(tx) >= ox + 32 || int'(ty) < oy || int'(ty) >= oy + 32 ||
              int'(tx) >= 120 || int'(ty) >= 88 ||
              int'(tx) % 32 != b % 32 || int'(ty) % 32 != b / 32 ||
              int'(sel_x) != int'(tx) / 32 || int'(sel_y) != int'(ty) / 32) begin
            failures++;
            if (failures < 10) $display("org %0d,%0d bank %0d: t %0d,%0d sel %0d,%0d", ox, oy, b, tx, ty, sel_x, sel_y);
          end
          if (int'(tx) < 120 && int'(ty) < 88 && !used[tx][ty]) begin used[tx][ty] = 1; distinct++; end
          #1;
        end
        checks++;
        if (distinct != 1024) begin failures++; $display("org %0d,%0d: %0d distinct transducers", ox, oy, distinct); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
