// Testbench for interp_unit with a 64-sample store modelled in the testbench (one
// cycle read latency). Run 1 keeps s_ready high and checks every interpolated value
// and the rate: 4*N_SAMP values, one per cycle, after a 2-cycle start-up. Runs 2-4
// stall the stream at random and check values, indices and s_done.
module tb_interp_unit;
  import sm3d_pkg::*;
  import sm3d_ref_pkg::*;

  localparam int N = 64, AW = 6;
  logic clk = 0, rst_n = 0, start = 0, re, s_valid, s_ready = 0, s_done;
  logic [AW-1:0] raddr;
  adc_t rdata, mem [N];
  logic [IDX_W-1:0] s_idx;
  isamp_t s_data;
  int checks = 0, failures = 0;
  int x[];

  interp_unit #(.N_SAMP(N)) dut (.clk, .rst_n, .start, .re, .raddr, .rdata,
                                 .s_valid, .s_idx, .s_data, .s_ready, .s_done);

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (re) rdata <= mem[raddr];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = new[N];
    rdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      int got, cycles;
      for (int i = 0; i < N; i++) begin
        x[i] = (run == 0 && i < 2) ? ((i == 0) ? -2048 : 2047) : int'(adc_t'($urandom));
        mem[i] = adc_t'(x[i]);
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      got = 0; cycles = 1;
      while (!s_done) begin
        s_ready = (run == 0) ? 1'b1 : 1'($urandom % 3 != 0);
        #1;
        if (s_valid && s_ready) begin
          checks++;
          if (int'(s_idx) != got || int'(s_data) != interp(x, got)) begin
            failures++;
            if (failures < 10) $display("run %0d i %0d: idx %0d data %0d exp %0d", run, got, s_idx, s_data, interp(x, got));
          end
          got++;
        end
        @(negedge clk);
        cycles++;
      end
      checks++;
      if (got != 4 * N) begin failures++; $display("run %0d: %0d values, exp %0d", run, got, 4 * N); end
      if (run == 0) begin
        checks++;
        if (cycles != 4 * N + 3) begin failures++; $display("rate: %0d cycles, exp %0d", cycles, 4 * N + 3); end
      end
      s_ready = 0;
      repeat (3) @(negedge clk);
      checks++;
      if (s_valid || !s_done) begin failures++; $display("stream did not stop"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
