// tb_sd_clk_gen: measures the SD clock period at both rates and checks that
// rise_stb/fall_stb mark exactly the system edges where the SD clock rises
// and falls.
module tb_sd_clk_gen;
  localparam int INIT_HALF = 5;
  localparam int FAST_HALF = 2;
  logic clk = 0, rst_n = 0, fast_sel = 0;
  logic sd_clk, rise_stb, fall_stb;
  int checks = 0, failures = 0;

  sd_clk_gen #(.INIT_HALF(INIT_HALF), .FAST_HALF(FAST_HALF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // strobes must predict the next edge of sd_clk
  logic prev_rise, prev_fall, prev_clk;
  int strobe_errs = 0;
  always @(posedge clk) begin
    prev_rise <= rise_stb;
    prev_fall <= fall_stb;
    prev_clk  <= sd_clk;
    if (rst_n && (prev_rise !== (!prev_clk && sd_clk) || prev_fall !== (prev_clk && !sd_clk)))
      strobe_errs++;
  end

  task automatic measure(input int exp_period, input string what);
    int t0, t1, cyc;
    cyc = 0;
    @(posedge clk iff rise_stb);
    @(posedge clk);
    t0 = 0;
    while (!rise_stb) begin @(posedge clk); t0++; end
    t1 = t0 + 1;
    checks++;
    if (t1 != exp_period) begin
      failures++;
      $display("FAIL %s: period %0d expected %0d", what, t1, exp_period);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    measure(2 * INIT_HALF, "init rate");
    measure(2 * INIT_HALF, "init rate again");
    fast_sel <= 1;
    repeat (30) @(posedge clk);
    measure(2 * FAST_HALF, "fast rate");
    fast_sel <= 0;
    repeat (30) @(posedge clk);
    measure(2 * INIT_HALF, "back to init rate");
    checks++;
    if (strobe_errs != 0) begin
      failures++;
      $display("FAIL strobes disagree with sd_clk %0d times", strobe_errs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
