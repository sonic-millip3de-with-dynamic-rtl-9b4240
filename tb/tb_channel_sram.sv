// Testbench for channel_sram at its default size (4096 x 12): fills every word
// with a random value, reads all of them back in random order and checks the data
// and the one-cycle read latency; also checks that the read data holds while no read
// is issued.
module tb_channel_sram;
  localparam int DEPTH = 4096, W = 12, AW = 12;
  logic clk = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  channel_sram dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = W'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 3 * DEPTH; t++) begin
      int a;
      a = (t < DEPTH) ? t : $urandom % DEPTH;
      @(negedge clk); re = 1; raddr = AW'(a);
      @(negedge clk); re = 0; raddr = AW'($urandom);
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        if (failures < 10) $display("addr %0d: %h exp %h", a, rdata, model[a]);
      end
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) failures++;   // held while re is low
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
