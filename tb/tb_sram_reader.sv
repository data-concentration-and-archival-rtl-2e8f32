// tb_sram_reader: reads a run of words from the SRAM model through a
// consumer that is ready at random and checks every byte (low byte first).
module tb_sram_reader;
  localparam int AW = 18;
  logic clk = 0, rst_n = 0, start = 0, busy;
  logic [AW-1:0] base = 0, sram_addr;
  logic [AW:0] words = 0;
  logic out_valid, out_ready = 0;
  logic [7:0] out_data;
  logic [15:0] sram_dq;
  logic sram_ce_n, sram_oe_n, sram_we_n, sram_ub_n, sram_lb_n;
  int reads;
  int checks = 0, failures = 0;

  sram_reader #(.ADDR_W(AW), .WAIT_CYCLES(1)) dut (.*);
  sram_model #(.ADDR_W(AW)) mem (.clk, .addr(sram_addr), .ce_n(sram_ce_n), .oe_n(sram_oe_n),
                                 .dq(sram_dq), .reads);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  int got = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      logic [15:0] w;
      logic [7:0]  exp;
      w   = 16'((32'(base) + got / 2) * 3 + 32'h1357);
      exp = (got % 2 == 0) ? w[7:0] : w[15:8];
      checks++;
      if (out_data !== exp) begin
        failures++;
        $display("FAIL byte %0d: %h expected %h", got, out_data, exp);
      end
      got++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    base <= 18'h1F00; words <= 19'd100;
    start <= 1; @(posedge clk); start <= 0;
    @(posedge clk);
    while (busy) @(posedge clk);
    repeat (3) @(posedge clk);
    checks++;
    if (got != 200) begin failures++; $display("FAIL got %0d bytes", got); end
    checks++;
    if (sram_we_n !== 1'b1) begin failures++; $display("FAIL write enable active"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
