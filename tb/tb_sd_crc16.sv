// tb_sd_crc16: checks the serial CRC16 against the known value for a block
// of 512 bytes of 0xFF (0x7FA1) and against a bit-by-bit reference for
// random blocks.
module tb_sd_crc16;
  logic clk = 0, rst_n = 0, clear = 0, en = 0, din = 0;
  logic [15:0] crc;
  int checks = 0, failures = 0;

  sd_crc16 dut (.clk, .rst_n, .clear, .en, .din, .crc);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed_byte(input logic [7:0] b);
    for (int k = 7; k >= 0; k--) begin
      din <= b[k]; en <= 1;
      @(posedge clk);
    end
  endtask

  task automatic check(input logic [15:0] exp, input string what);
    en <= 0;
    @(posedge clk);
    checks++;
    if (crc !== exp) begin
      failures++;
      $display("FAIL %s: crc %h expected %h", what, crc, exp);
    end
  endtask

  initial begin
    logic [15:0] ref_crc;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // 512 x 0xFF -> 0x7FA1 (SD specification example)
    clear <= 1; @(posedge clk); clear <= 0;
    for (int i = 0; i < 512; i++) feed_byte(8'hFF);
    check(16'h7FA1, "512 x FF");
    // random blocks against a polynomial-division reference
    for (int t = 0; t < 8; t++) begin
      int n;
      logic [7:0] d [64];
      logic msb;
      n = 1 + int'($urandom_range(0, 40));
      ref_crc = 0;
      for (int i = 0; i < n; i++) d[i] = 8'($urandom);
      for (int i = 0; i < n; i++)
        for (int k = 7; k >= 0; k--) begin
          msb = ref_crc[15];
          ref_crc = {ref_crc[14:0], 1'b0};
          if (msb ^ d[i][k]) ref_crc ^= 16'h1021;
        end
      clear <= 1; @(posedge clk); clear <= 0;
      for (int i = 0; i < n; i++) feed_byte(d[i]);
      check(ref_crc, $sformatf("random block %0d", t));
    end
    // clear returns to zero
    clear <= 1; @(posedge clk); clear <= 0;
    check(16'h0000, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
